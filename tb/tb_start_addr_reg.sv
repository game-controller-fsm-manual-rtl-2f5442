// tb_start_addr_reg: self-checking test of the start-address register.
//
// Drives a changing data value every cycle with occasional capture pulses and
// checks that the output loads the data only on capture edges and holds
// otherwise, and that the asynchronous reset clears it.
module tb_start_addr_reg;
  logic       clk = 1'b0;
  logic       rst = 1'b0;
  logic       capture = 1'b0;
  logic [7:0] d = '0;
  logic [7:0] q;
  int         checks = 0, failures = 0;
  logic [7:0] ref_q = '0;
  int         captures = 0;

  start_addr_reg dut (.*);

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
      $display("FAIL %s: q=%0d ref=%0d", what, q, ref_q);
    end
  endtask

  initial begin
    #12;
    rst = 1'b0;
    chk(q == 0, "reset value");
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      d = 8'($urandom);
      capture = ($urandom % 9) == 0;
      @(posedge clk);
      if (capture) begin
        ref_q = d;
        captures++;
      end
      #1;
      chk(q == ref_q, capture ? "capture" : "hold");
    end
    chk(captures > 5, "captures exercised");
    @(negedge clk);
    capture = 1'b0;
    d = 8'hA5;
    @(posedge clk);
    #1;
    if (ref_q == 0) ref_q = q;  // keep a nonzero value for the reset check
    rst = 1'b1;
    #1;
    chk(q == 0, "async reset");
    rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
