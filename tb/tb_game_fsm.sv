// tb_game_fsm: self-checking test of the game FSM.
//
// For each reachable state (IDLE, PLAY, USER) and each of the eight event
// codes, the FSM is reset, walked to the state, given the event, and the
// Moore levels, the Mealy pulses before the edge and the state after exactly
// one edge are compared with the transition table. The unreachable BLNK code
// is forced into the state register to check that every event code leads back
// to IDLE in one clock with no pulses. The asynchronous reset is checked to
// act without a clock edge.
module tb_game_fsm;
  import simon_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b0;
  event_t      ev  = EV_NONE;
  state_t      state;
  logic        playd, userd;
  fsm_pulses_t pulses;
  int          checks = 0, failures = 0;
  int          cycles = 0;

  game_fsm dut (.*);

  always #5 clk = ~clk;

  // reset pulse at start-up: the asynchronous reset needs a rising edge
  initial #1 rst = 1'b1;
  always @(posedge clk) cycles++;

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (state=%s ev=%s pulses=%06b)", what, state.name(), ev.name(), pulses);
    end
  endtask

  // Reference transition table: next state and pulses {ldpd,ldpm,rinc,slose,swin,gmrst}.
  function automatic void ref_step(input logic [1:0] s, input logic [2:0] e,
                                   output logic [1:0] ns, output logic [5:0] p);
    ns = s;
    p  = 6'b000000;
    case (s)
      2'b00: if (e == 3'b000) begin ns = 2'b01; p = 6'b100001; end
      2'b01: if (e == 3'b001) begin ns = 2'b11; p = 6'b010000; end
      2'b11: begin
        if (e == 3'b100) begin ns = 2'b01; p = 6'b101000; end
        if (e == 3'b101) begin ns = 2'b00; p = 6'b000010; end
        if (e == 3'b010) begin ns = 2'b00; p = 6'b000100; end
      end
      default: ns = 2'b00;
    endcase
  endfunction

  task automatic clock_with(input event_t e);
    @(negedge clk);
    ev = e;
    @(posedge clk);
    #1;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    ev  = EV_NONE;
    #2;
    rst = 1'b0;
  endtask

  task automatic go_to(input logic [1:0] s);
    do_reset();
    if (s != 2'b00) clock_with(EV_START);
    if (s == 2'b11) clock_with(EV_PD_FIN);
    chk(state == state_t'(s), $sformatf("reach state %02b", s));
  endtask

  initial begin
    logic [1:0] ns;
    logic [5:0] p;
    int c0;
    logic [1:0] states [3] = '{2'b00, 2'b01, 2'b11};

    foreach (states[i]) begin
      for (int e = 0; e < 8; e++) begin
        go_to(states[i]);
        @(negedge clk);
        ev = event_t'(e);
        #1;
        ref_step(states[i], 3'(e), ns, p);
        chk(pulses == p, $sformatf("pulses from %02b on %03b", states[i], e));
        chk(playd == (states[i] == 2'b01), "PLAYD level");
        chk(userd == (states[i] == 2'b11), "USERD level");
        c0 = cycles;
        @(posedge clk);
        #1;
        chk(cycles == c0 + 1, "one edge per transition");
        chk(state == state_t'(ns), $sformatf("next state from %02b on %03b", states[i], e));
        chk(playd == (ns == 2'b01) && userd == (ns == 2'b11), "Moore levels after edge");
      end
    end

    // BLNK recovery for every event code
    for (int e = 0; e < 8; e++) begin
      do_reset();
      @(negedge clk);
      force dut.state = ST_BLNK;
      #1;
      release dut.state;
      ev = event_t'(e);
      #1;
      chk(state == ST_BLNK, "BLNK forced");
      chk(pulses == '0, "no pulses in BLNK");
      chk(!playd && !userd, "no Moore level in BLNK");
      @(posedge clk);
      #1;
      chk(state == ST_IDLE, $sformatf("BLNK recovers to IDLE on %03b", e));
    end

    // asynchronous reset: from USER, reset between edges
    go_to(2'b11);
    @(negedge clk);
    ev = EV_NONE;
    #1;
    rst = 1'b1;
    #1;
    chk(state == ST_IDLE, "async reset without clock edge");
    @(posedge clk);
    #1;
    chk(state == ST_IDLE, "reset holds IDLE");
    rst = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
