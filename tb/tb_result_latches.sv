// tb_result_latches: self-checking test of the WIN / LOSE indicators.
//
// Runs the game sequences (lose then restart, win then restart) and random
// pulse patterns against a reference model, and checks the asynchronous reset.
module tb_result_latches;
  logic clk = 1'b0;
  logic rst = 1'b0;
  logic gmrst = 1'b0, slose = 1'b0, swin = 1'b0;
  logic q_lose, q_win;
  int   checks = 0, failures = 0;
  logic ref_lose = 1'b0, ref_win = 1'b0;

  result_latches dut (.*);

  always #5 clk = ~clk;

  // reset pulse at start-up: the asynchronous reset needs a rising edge
  initial #1 rst = 1'b1;

  initial begin
    #50000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: lose=%b win=%b ref %b %b", what, q_lose, q_win, ref_lose, ref_win);
    end
  endtask

  task automatic cyc(input logic g, input logic l, input logic w, input string what);
    @(negedge clk);
    gmrst = g;
    slose = l;
    swin  = w;
    @(posedge clk);
    if (g) begin
      ref_lose = 1'b0;
      ref_win  = 1'b0;
    end else begin
      if (l) ref_lose = 1'b1;
      if (w) ref_win  = 1'b1;
    end
    #1;
    chk(q_lose == ref_lose && q_win == ref_win, what);
  endtask

  initial begin
    #12;
    rst = 1'b0;
    chk(!q_lose && !q_win, "reset value");
    cyc(1, 0, 0, "game start");
    cyc(0, 1, 0, "lose sets");
    repeat (3) cyc(0, 0, 0, "lose holds");
    chk(q_lose, "lose stays lit");
    cyc(1, 0, 0, "restart clears lose");
    cyc(0, 0, 1, "win sets");
    repeat (3) cyc(0, 0, 0, "win holds");
    chk(q_win, "win stays lit");
    cyc(1, 0, 0, "restart clears win");
    for (int n = 0; n < 200; n++) begin
      int r;
      r = $urandom % 6;
      cyc(r == 0, r == 1, r == 2, "random");
    end
    cyc(0, 1, 0, "set before reset");
    rst = 1'b1;
    #1;
    chk(!q_lose && !q_win, "async reset");
    rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
