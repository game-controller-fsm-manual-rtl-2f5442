// game_controller: the complete game-controller block of a Simon Says machine.
//
// It knows where a game is in its lifecycle and tells the rest of the machine
// (the Pattern Display, which plays the colour sequence, and the Pattern
// Matcher, which checks the player's presses) what to do next.
//   * event_encoder turns the five event inputs into a 3-bit event code.
//   * game_fsm steps IDLE -> PLAY -> USER and issues the Moore levels PLAYD /
//     USERD and the one-cycle Mealy pulses LDPD, LDPM, RINC, SLOSE, SWIN and
//     GMRST.
//   * round_counter counts completed rounds (RINC increments, GMRST clears)
//     and raises max_rnd at round 15.
//   * result_latches hold the LOSE and WIN indicators (SLOSE / SWIN set,
//     GMRST clears).
//   * random_counter spins an 8-bit count on fast_clk; start_addr_reg
//     captures it on GMRST as the start address of the new game.
//
// Timing: everything except random_counter runs on clk, one edge per game
// step. Pulses are combinational from state and event and are valid during
// the cycle before the edge that acts on them; the state, round count,
// indicators and start address change on that edge. rst is asynchronous,
// active high, and returns every register to 0 (state IDLE) at once.
// fast_clk is an independent free-running clock.
//
// The event inputs must be mutually exclusive; with none asserted the code is
// START, so an idle clock edge in IDLE begins a game.
//
// The partitioning, state and event codes, pulses and widths are those of the
// original gate-level controller. Running every game-side register on one
// clock with the pulses as enables (the original clocks the round counter and
// the start-address register with the pulses themselves), the separate
// fast_clk input and the two assertions are this design's choices. The
// assertions use rst as their disable condition, which lint reports as the
// reset being used both asynchronously and synchronously; no logic does so.
module game_controller
  import simon_pkg::*;
(
  input  logic              clk,
  input  logic              fast_clk,
  input  logic              rst,
  // events from the Pattern Display / Pattern Matcher and the START button
  input  logic              ev_start,
  input  logic              ev_pd_fin,
  input  logic              ev_lose,
  input  logic              ev_adv,
  input  logic              ev_win,
  // FSM state and outputs
  output event_t            event_code,
  output state_t            state,
  output logic              playd,
  output logic              userd,
  output logic              ldpd,
  output logic              ldpm,
  output logic              rinc,
  output logic              slose,
  output logic              swin,
  output logic              gmrst,
  // indicators and round
  output logic              q_lose,
  output logic              q_win,
  output logic [ROUND_W-1:0] round_count,
  output logic              max_rnd,
  // random start address
  output logic [ADDR_W-1:0] strt_adr,
  output logic [ADDR_W-1:0] start_address
);

  fsm_pulses_t pulses;

  event_encoder u_encoder (
    .start  (ev_start),
    .pd_fin (ev_pd_fin),
    .lose   (ev_lose),
    .adv    (ev_adv),
    .win    (ev_win),
    .code   (event_code)
  );

  game_fsm u_fsm (
    .clk    (clk),
    .rst    (rst),
    .ev     (event_code),
    .state  (state),
    .playd  (playd),
    .userd  (userd),
    .pulses (pulses)
  );

  assign ldpd  = pulses.ldpd;
  assign ldpm  = pulses.ldpm;
  assign rinc  = pulses.rinc;
  assign slose = pulses.slose;
  assign swin  = pulses.swin;
  assign gmrst = pulses.gmrst;

  round_counter #(.WIDTH(ROUND_W)) u_round (
    .clk     (clk),
    .rst     (rst),
    .clr     (pulses.gmrst),
    .inc     (pulses.rinc),
    .count   (round_count),
    .max_rnd (max_rnd)
  );

  result_latches u_latches (
    .clk    (clk),
    .rst    (rst),
    .gmrst  (pulses.gmrst),
    .slose  (pulses.slose),
    .swin   (pulses.swin),
    .q_lose (q_lose),
    .q_win  (q_win)
  );

  random_counter #(.WIDTH(ADDR_W)) u_random (
    .fast_clk (fast_clk),
    .rst      (rst),
    .strt_adr (strt_adr)
  );

  start_addr_reg #(.WIDTH(ADDR_W)) u_start (
    .clk     (clk),
    .rst     (rst),
    .capture (pulses.gmrst),
    .d       (strt_adr),
    .q       (start_address)
  );

  // The game only ever raises one event at a time.
  a_events_exclusive: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ev_start, ev_pd_fin, ev_lose, ev_adv, ev_win}))
    else $error("more than one game event asserted at once");

  // A game ends either won or lost, never both.
  a_single_result: assert property (@(posedge clk) disable iff (rst)
    !(q_win && q_lose))
    else $error("WIN and LOSE indicators both set");

endmodule
