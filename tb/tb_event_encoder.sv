// tb_event_encoder: self-checking test of the event encoder.
//
// Applies every single-event input and the idle input set and compares the
// code with the event-code table (START 000, PD_FIN 001, LOSE 010, ADV 100,
// WIN 101); then sweeps all 32 input combinations and checks each code bit
// against the OR-gate equations.
module tb_event_encoder;
  import simon_pkg::*;

  logic   start, pd_fin, lose, adv, win;
  event_t code;
  int     checks = 0, failures = 0;

  event_encoder dut (.*);

  task automatic expect_code(input logic [4:0] ins, input logic [2:0] exp, input string what);
    {start, pd_fin, lose, adv, win} = ins;
    #1;
    checks++;
    if (code !== exp) begin
      failures++;
      $display("FAIL %s: code=%03b expected %03b", what, code, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // inputs ordered {start, pd_fin, lose, adv, win}
    expect_code(5'b10000, 3'b000, "START");
    expect_code(5'b01000, 3'b001, "PD_FIN");
    expect_code(5'b00100, 3'b010, "LOSE");
    expect_code(5'b00010, 3'b100, "ADV");
    expect_code(5'b00001, 3'b101, "WIN");
    expect_code(5'b00000, 3'b000, "no input reads as START");
    for (int i = 0; i < 32; i++) begin
      logic [4:0] v;
      logic [2:0] e;
      v = 5'(i);
      // v = {start, pd_fin, lose, adv, win}
      e[0] = v[3] | v[0];
      e[1] = v[2];
      e[2] = v[1] | v[0];
      expect_code(v, e, $sformatf("sweep %05b", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
