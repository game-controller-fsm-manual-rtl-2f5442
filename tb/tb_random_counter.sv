// tb_random_counter: self-checking test of the free-running random counter.
//
// Counts fast-clock edges independently and checks that the counter advances
// by one per edge, wraps from 255 to 0, and restarts from 0 after an
// asynchronous reset applied between edges.
module tb_random_counter;
  timeunit 1ns;
  timeprecision 1ps;
  logic       fast_clk = 1'b0;
  logic       rst = 1'b0;
  logic [7:0] strt_adr;
  int         checks = 0, failures = 0;
  int         edges = 0;
  int         wraps = 0;

  random_counter dut (.*);

  always #2 fast_clk = ~fast_clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: strt_adr=%0d edges=%0d", what, strt_adr, edges);
    end
  endtask

  initial begin
    #0.5;
    rst = 1'b1;
    #0.5;
    chk(strt_adr == 0, "reset value");
    rst = 1'b0;
    for (int n = 0; n < 600; n++) begin
      @(posedge fast_clk);
      edges++;
      #1;
      chk(strt_adr == 8'(edges), "count follows edges");
      if (strt_adr == 0) wraps++;
    end
    chk(wraps == 2, "wrapped past 255 twice");
    // asynchronous reset between edges
    @(negedge fast_clk);
    rst = 1'b1;
    #0.5;
    chk(strt_adr == 0, "async reset");
    @(negedge fast_clk);
    rst = 1'b0;
    edges = 0;
    repeat (10) begin
      @(posedge fast_clk);
      edges++;
      #1;
      chk(strt_adr == 8'(edges), "restart from 0 after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
