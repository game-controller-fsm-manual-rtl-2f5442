// tb_round_counter: self-checking test of the round counter.
//
// Drives random increment and clear pulses on the clock, compares the count
// and max_rnd with a reference count every cycle, counts all the way to 15
// to see max_rnd, and checks that the asynchronous reset clears the count
// without a clock edge.
module tb_round_counter;
  logic       clk = 1'b0;
  logic       rst = 1'b0;
  logic       clr = 1'b0;
  logic       inc = 1'b0;
  logic [3:0] count;
  logic       max_rnd;
  int         checks = 0, failures = 0;
  int         ref_count = 0;
  int         max_seen = 0;

  round_counter dut (.*);

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
      $display("FAIL %s: count=%0d ref=%0d max_rnd=%b", what, count, ref_count, max_rnd);
    end
  endtask

  task automatic cyc(input logic c, input logic i);
    @(negedge clk);
    clr = c;
    inc = i;
    @(posedge clk);
    if (c) ref_count = 0;
    else if (i) ref_count = (ref_count + 1) % 16;
    #1;
    chk(count == 4'(ref_count), "count");
    chk(max_rnd == (ref_count == 15), "max_rnd");
    if (max_rnd) max_seen++;
  endtask

  initial begin
    #12;
    rst = 1'b0;
    chk(count == 0, "reset value");
    // full game: 15 rounds to the final one
    for (int r = 0; r < 15; r++) begin
      cyc(1'b0, 1'b1);
      cyc(1'b0, 1'b0);
    end
    chk(count == 15 && max_rnd, "round 15 reached");
    cyc(1'b1, 1'b0);
    chk(count == 0, "clear");
    for (int n = 0; n < 400; n++) cyc(($urandom % 23) == 0, ($urandom % 2) == 0);
    // async reset
    repeat (5) cyc(1'b0, 1'b1);
    @(negedge clk);
    inc = 1'b0;
    #1;
    rst = 1'b1;
    #1;
    ref_count = 0;
    chk(count == 0, "async reset");
    rst = 1'b0;
    chk(max_seen > 0, "max_rnd observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
