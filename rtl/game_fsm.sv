// game_fsm: lifecycle controller of the Simon Says game.
//
// A two-bit state register {Q0,Q1} steps through IDLE (00) -> PLAY (01) ->
// USER (11) and back, driven by a 3-bit event code:
//   IDLE + START  -> PLAY, pulses LDPD and GMRST (new game)
//   PLAY + PD_FIN -> USER, pulse LDPM (player's turn)
//   USER + ADV    -> PLAY, pulses LDPD and RINC (next, longer round)
//   USER + WIN    -> IDLE, pulse SWIN
//   USER + LOSE   -> IDLE, pulse SLOSE
//   BLNK (10)     -> IDLE on the next clock for every event code
// Every other combination holds the state and fires nothing.
// Moore outputs PLAYD/USERD are decoded from the state; the Mealy pulses are
// combinational from state and event, so they are valid during the cycle
// before the clock edge that performs the transition and last one cycle as
// long as the event is presented for one cycle.
//
// Reset is asynchronous, active high, and forces IDLE. Next-state logic is
// written as a case statement rather than as the minimised JK excitation
// equations of the gate-level build; the behaviour, including the BLNK
// recovery, is the same.
module game_fsm
  import simon_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  event_t      ev,
  output state_t      state,
  output logic        playd,
  output logic        userd,
  output fsm_pulses_t pulses
);

  state_t next_state;

  always_comb begin
    next_state = state;
    pulses     = '0;
    unique case (state)
      ST_IDLE: begin
        if (ev == EV_START) begin
          next_state   = ST_PLAY;
          pulses.ldpd  = 1'b1;
          pulses.gmrst = 1'b1;
        end
      end
      ST_PLAY: begin
        if (ev == EV_PD_FIN) begin
          next_state  = ST_USER;
          pulses.ldpm = 1'b1;
        end
      end
      ST_USER: begin
        unique case (ev)
          EV_ADV: begin
            next_state  = ST_PLAY;
            pulses.ldpd = 1'b1;
            pulses.rinc = 1'b1;
          end
          EV_WIN: begin
            next_state  = ST_IDLE;
            pulses.swin = 1'b1;
          end
          EV_LOSE: begin
            next_state   = ST_IDLE;
            pulses.slose = 1'b1;
          end
          default: ;
        endcase
      end
      ST_BLNK: next_state = ST_IDLE;
      default: next_state = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= ST_IDLE;
    else     state <= next_state;
  end

  assign playd = (state == ST_PLAY);
  assign userd = (state == ST_USER);

endmodule
