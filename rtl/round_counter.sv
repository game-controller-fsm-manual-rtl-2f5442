// round_counter: counts the rounds completed in the current game.
//
// A WIDTH-bit up counter (4 bits, 0..15). It increments on a clock edge at
// which inc (the FSM's RINC pulse) is high, clears on a clock edge at which
// clr (the FSM's GMRST pulse) is high, and clears at once on the asynchronous
// reset. max_rnd is high while the count is all ones (15), telling the event
// source that the next correct round is the final one and must raise WIN
// rather than ADV. The count wraps if incremented past 15, which the game
// never does.
//
// The original counter is clocked by the RINC pulse itself and cleared by
// GMRST OR RESET; here it is a synchronous counter on the system clock with
// RINC and GMRST as enables, so the count changes on the same edge as the
// FSM's transition. That is this design's choice.
module round_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             inc,
  output logic [WIDTH-1:0] count,
  output logic             max_rnd
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)      count <= '0;
    else if (clr) count <= '0;
    else if (inc) count <= count + 1'b1;
  end

  assign max_rnd = &count;

endmodule
