// start_addr_reg: holds the start address of the current game.
//
// A WIDTH-bit (8-bit) register that loads d (the live random counter value)
// on a game-clock edge at which capture (the FSM's GMRST pulse) is high, and
// otherwise holds, so the address stays fixed for a whole game and feeds the
// Pattern Display's parallel load on every LDPD. The asynchronous reset clears
// it to 0.
//
// The original register is clocked by the GMRST pulse; here it sits on the
// game clock with GMRST as load enable, which is this design's choice. d comes
// from the fast clock domain and is sampled without synchronisation: a sample
// taken while the counter changes may mix old and new bits, which is harmless
// because any 8-bit value is a valid, equally unpredictable start address.
module start_addr_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             capture,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)          q <= '0;
    else if (capture) q <= d;
  end

endmodule
