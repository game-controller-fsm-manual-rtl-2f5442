// result_latches: the LOSE and WIN indicators of the game.
//
// Two set/clear flip-flops on the game clock. q_lose is set by the SLOSE
// pulse and q_win by the SWIN pulse; both stay set while the machine sits in
// IDLE after the game and are cleared by the next game-start pulse GMRST, or
// at once by the asynchronous reset. Set and clear never coincide in the game
// (they come from different FSM transitions); should they, clear wins.
// Which pulses set and clear the indicators follows the original; building
// them as clocked flip-flops is this design's choice.
module result_latches (
  input  logic clk,
  input  logic rst,
  input  logic gmrst,
  input  logic slose,
  input  logic swin,
  output logic q_lose,
  output logic q_win
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q_lose <= 1'b0;
      q_win  <= 1'b0;
    end else if (gmrst) begin
      q_lose <= 1'b0;
      q_win  <= 1'b0;
    end else begin
      if (slose) q_lose <= 1'b1;
      if (swin)  q_win  <= 1'b1;
    end
  end

endmodule
