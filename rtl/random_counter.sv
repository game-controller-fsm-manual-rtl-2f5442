// random_counter: free-running counter that supplies the random start address.
//
// A WIDTH-bit (8-bit) binary up counter on its own fast clock, much faster
// than a player can react. It never stops and is cleared only by the
// asynchronous global reset, after which it restarts from 0. Its live value
// strt_adr is sampled at the moment a new game starts; the player's reaction
// time makes that sample unpredictable.
//
// Interface: fast_clk is independent of the game clock; strt_adr changes on
// every rising fast_clk edge and wraps from 255 to 0.
module random_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             fast_clk,
  input  logic             rst,
  output logic [WIDTH-1:0] strt_adr
);

  always_ff @(posedge fast_clk or posedge rst) begin
    if (rst) strt_adr <= '0;
    else     strt_adr <= strt_adr + 1'b1;
  end

endmodule
