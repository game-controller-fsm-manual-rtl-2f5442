// tb_game_controller: end-to-end test of the game controller at its default
// sizes (4-bit round counter, 8-bit start address).
//
// The testbench plays the part of the Pattern Display and Pattern Matcher: it
// raises PD_FIN when a sequence has been shown, then ADV after a correct round
// or WIN when the round counter reports the final round (max_rnd), or LOSE.
// A reference model of the state, round count, indicators and start address
// is updated from the events and compared with the design after every clock
// edge; the Mealy pulses are compared before each edge. The start address is
// checked against the random counter value present at the game-start edge.
//
// Scenario: reset; a full game won after 15 advances; restart from WIN; a
// game lost in round 3; holds in IDLE, PLAY and USER; random games; an
// asynchronous reset in mid-game; recovery from the unreachable BLNK code.
// Each of these mechanisms is counted and a mechanism that never occurred is
// a failure.
module tb_game_controller;
  timeunit 1ns;
  timeprecision 1ps;
  import simon_pkg::*;

  logic       clk = 1'b0;
  logic       fast_clk = 1'b0;
  logic       rst = 1'b0;
  // PD_FIN is held during reset so that the first edge in IDLE is not read as START
  logic       ev_start = 1'b0, ev_pd_fin = 1'b1, ev_lose = 1'b0, ev_adv = 1'b0, ev_win = 1'b0;
  event_t     event_code;
  state_t     state;
  logic       playd, userd, ldpd, ldpm, rinc, slose, swin, gmrst;
  logic       q_lose, q_win;
  logic [3:0] round_count;
  logic       max_rnd;
  logic [7:0] strt_adr, start_address;

  game_controller dut (.*);

  // game clock 100 MHz; the fast clock edges fall between game-clock edges
  always #5 clk = ~clk;

  // reset pulse at start-up: the asynchronous reset needs a rising edge
  initial #1 rst = 1'b1;
  initial begin
    #0.5;
    forever #1 fast_clk = ~fast_clk;
  end

  int checks = 0, failures = 0;

  // reference model
  logic [1:0] ref_state = 2'b00;
  int         ref_round = 0;
  logic       ref_lose = 1'b0, ref_win = 1'b0;
  logic [7:0] ref_addr = '0;
  logic [7:0] prev_addr = '0;

  // mechanism counters
  int n_start = 0, n_pdfin = 0, n_adv = 0, n_win = 0, n_lose = 0;
  int n_hold_idle = 0, n_hold_play = 0, n_hold_user = 0, n_max_rnd = 0;
  int n_capture = 0, n_new_addr = 0, n_blnk = 0, n_async_rst = 0, n_idle_start = 0;

  typedef enum {IN_NONE, IN_START, IN_PDFIN, IN_LOSE, IN_ADV, IN_WIN} in_t;

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: state=%02b round=%0d lose=%b win=%b addr=%0d (ref %02b %0d %b %b %0d)",
               what, $time, state, round_count, q_lose, q_win, start_address,
               ref_state, ref_round, ref_lose, ref_win, ref_addr);
    end
  endtask

  function automatic logic [2:0] code_of(input in_t i);
    case (i)
      IN_PDFIN: return 3'b001;
      IN_LOSE:  return 3'b010;
      IN_ADV:   return 3'b100;
      IN_WIN:   return 3'b101;
      default:  return 3'b000;  // START, and no input at all
    endcase
  endfunction

  task automatic check_regs(input string what);
    chk(state == state_t'(ref_state), {what, ": state"});
    chk(playd == (ref_state == 2'b01) && userd == (ref_state == 2'b11), {what, ": PLAYD/USERD"});
    chk(round_count == 4'(ref_round), {what, ": round count"});
    chk(max_rnd == (ref_round == 15), {what, ": max_rnd"});
    chk(q_lose == ref_lose && q_win == ref_win, {what, ": indicators"});
    chk(start_address == ref_addr, {what, ": start address"});
  endtask

  // One game-clock step with input i asserted during the cycle.
  task automatic step(input in_t i);
    logic [2:0] c;
    logic [5:0] exp_p;  // {ldpd, ldpm, rinc, slose, swin, gmrst}
    logic [1:0] ns;
    logic [7:0] sampled;
    @(negedge clk);
    {ev_start, ev_pd_fin, ev_lose, ev_adv, ev_win} = '0;
    case (i)
      IN_START: ev_start  = 1'b1;
      IN_PDFIN: ev_pd_fin = 1'b1;
      IN_LOSE:  ev_lose   = 1'b1;
      IN_ADV:   ev_adv    = 1'b1;
      IN_WIN:   ev_win    = 1'b1;
      default: ;
    endcase
    c = code_of(i);
    ns = ref_state;
    exp_p = '0;
    case (ref_state)
      2'b00: if (c == 3'b000) begin ns = 2'b01; exp_p = 6'b100001; end
      2'b01: if (c == 3'b001) begin ns = 2'b11; exp_p = 6'b010000; end
      2'b11: case (c)
        3'b100:  begin ns = 2'b01; exp_p = 6'b101000; end
        3'b101:  begin ns = 2'b00; exp_p = 6'b000010; end
        3'b010:  begin ns = 2'b00; exp_p = 6'b000100; end
        default: ;
      endcase
      default: ns = 2'b00;
    endcase
    #1;
    chk(event_code == event_t'(c), "event code");
    chk({ldpd, ldpm, rinc, slose, swin, gmrst} == exp_p, "Mealy pulses before the edge");
    // mechanism accounting
    if (ns == ref_state) begin
      if (ref_state == 2'b00) n_hold_idle++;
      if (ref_state == 2'b01) n_hold_play++;
      if (ref_state == 2'b11) n_hold_user++;
    end
    @(posedge clk);
    sampled = strt_adr;  // stable: fast-clock edges never coincide
    ref_state = ns;
    if (exp_p[0]) begin
      ref_round = 0;
      ref_lose  = 1'b0;
      ref_win   = 1'b0;
      prev_addr = ref_addr;
      ref_addr  = sampled;
      n_start++;
      n_capture++;
      if (ref_addr != prev_addr) n_new_addr++;
      if (i == IN_NONE) n_idle_start++;
    end
    if (exp_p[4]) n_pdfin++;
    if (exp_p[3]) begin ref_round = (ref_round + 1) % 16; n_adv++; end
    if (exp_p[2]) begin ref_lose = 1'b1; n_lose++; end
    if (exp_p[1]) begin ref_win = 1'b1; n_win++; end
    #1;
    check_regs("after edge");
    if (max_rnd) n_max_rnd++;
    {ev_start, ev_pd_fin, ev_lose, ev_adv, ev_win} = '0;
  endtask

  task automatic async_reset();
    @(negedge clk);
    #2;
    rst = 1'b1;
    #1;
    ref_state = 2'b00;
    ref_round = 0;
    ref_lose  = 1'b0;
    ref_win   = 1'b0;
    ref_addr  = '0;
    check_regs("async reset, no clock edge");
    chk(strt_adr == 0, "random counter cleared by reset");
    ev_pd_fin = 1'b1;  // keep IDLE until the next step drives its own event
    #1;
    rst = 1'b0;
    n_async_rst++;
  endtask

  // Play one round in USER: the Pattern Matcher sees a few correct presses
  // (no FSM event), then ends the round with ADV/WIN, or LOSE.
  task automatic play_round(input bit lose_it);
    int presses = 1 + int'($urandom % 3);
    repeat (presses) step(IN_NONE);  // mid-round correct press: hold USER
    if (lose_it)      step(IN_LOSE);
    else if (max_rnd) step(IN_WIN);
    else              step(IN_ADV);
  endtask

  // Show a sequence: a few cycles in PLAY, then PD_FIN.
  task automatic show_sequence();
    repeat (1 + int'($urandom % 3)) step(IN_NONE);
    step(IN_PDFIN);
  endtask

  // Full game; lose_round < 0 means play to the win.
  task automatic play_game(input int lose_round);
    int r = 0;
    step(IN_START);
    forever begin
      show_sequence();
      play_round(r == lose_round);
      if (state == ST_IDLE) break;
      r++;
    end
  endtask

  initial begin
    int rounds_before_win;
    #3;
    check_regs("in reset");
    rst = 1'b0;

    // ---- win path: all 15 rounds, then WIN
    play_game(-1);
    chk(q_win && !q_lose, "game won");
    rounds_before_win = ref_round;
    chk(rounds_before_win == 15, "WIN after 15 completed rounds");

    // events other than START hold IDLE and keep the indicators
    step(IN_PDFIN);
    step(IN_ADV);
    step(IN_LOSE);
    step(IN_WIN);
    chk(q_win, "WIN stays lit in IDLE");

    // ---- restart from WIN, then lose in round 3
    play_game(3);
    chk(q_lose && !q_win, "game lost");
    chk(ref_round == 3, "round count holds at loss");

    // ---- hold paths in PLAY: START ignored, no toggles ignored
    step(IN_START);
    step(IN_START);
    step(IN_NONE);
    step(IN_WIN);
    step(IN_PDFIN);
    // in USER: START, PD_FIN and no toggles all hold
    step(IN_START);
    step(IN_PDFIN);
    step(IN_NONE);
    step(IN_LOSE);

    // ---- an idle clock with no event reads as START (no group select)
    step(IN_NONE);
    chk(state == ST_PLAY, "idle input in IDLE starts a game");

    // ---- asynchronous reset in mid-game
    show_sequence();
    step(IN_ADV);
    async_reset();

    // ---- random games
    for (int g = 0; g < 12; g++) begin
      int lr;
      lr = int'($urandom % 20) - 4;  // negative or >= 15: play to the win
      play_game(lr >= 15 ? -1 : lr);
    end

    // ---- recovery from the unreachable BLNK code
    // (each step ends just after a rising edge, well before the next one)
    for (int e = 0; e < 6; e++) begin
      #1;
      force dut.u_fsm.state = ST_BLNK;
      #1;
      release dut.u_fsm.state;
      #1;
      chk(state == ST_BLNK, "BLNK forced");
      chk({ldpd, ldpm, rinc, slose, swin, gmrst} == '0, "no pulses in BLNK");
      ref_state = 2'b10;
      step(in_t'(e));
      chk(state == ST_IDLE, "BLNK returns to IDLE");
      n_blnk++;
    end

    // ---- every mechanism must have happened
    chk(n_start > 0,      "mechanism: game start");
    chk(n_pdfin > 0,      "mechanism: sequence shown (PD_FIN)");
    chk(n_adv > 0,        "mechanism: round advance");
    chk(n_win > 0,        "mechanism: win");
    chk(n_lose > 0,       "mechanism: lose");
    chk(n_hold_idle > 0,  "mechanism: hold in IDLE");
    chk(n_hold_play > 0,  "mechanism: hold in PLAY");
    chk(n_hold_user > 0,  "mechanism: hold in USER (mid-round press)");
    chk(n_max_rnd > 0,    "mechanism: final round flagged");
    chk(n_capture > 0,    "mechanism: start address capture");
    chk(n_new_addr > 0,   "mechanism: new start address per game");
    chk(n_blnk > 0,       "mechanism: BLNK recovery");
    chk(n_async_rst > 0,  "mechanism: asynchronous reset");
    chk(n_idle_start > 0, "mechanism: idle input read as START");
    $display("games=%0d wins=%0d losses=%0d advances=%0d holds idle/play/user=%0d/%0d/%0d new addresses=%0d blnk=%0d",
             n_start, n_win, n_lose, n_adv, n_hold_idle, n_hold_play, n_hold_user, n_new_addr, n_blnk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
