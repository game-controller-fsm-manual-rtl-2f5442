// simon_pkg: types and constants shared by the Simon Says game-controller blocks.
//
// State codes follow the two-flip-flop encoding {Q0,Q1} with Q0 the MSB:
// IDLE=00, PLAY=01, USER=11 and the unreachable recovery code BLNK=10.
// Event codes are 3-bit numbers, MSB first: START=000, PD_FIN=001, LOSE=010,
// correct mid-round press=011, ADV=100, WIN=101, unassigned=110, no event=111.
// The widths of the round counter and of the random start address (4 and 8
// bits) are the sizes of the original counter chips.
package simon_pkg;

  typedef enum logic [1:0] {
    ST_IDLE = 2'b00,
    ST_PLAY = 2'b01,
    ST_USER = 2'b11,
    ST_BLNK = 2'b10
  } state_t;

  typedef enum logic [2:0] {
    EV_START   = 3'b000,
    EV_PD_FIN  = 3'b001,
    EV_LOSE    = 3'b010,
    EV_CORRECT = 3'b011,  // correct mid-round press: no FSM rail, hold
    EV_ADV     = 3'b100,
    EV_WIN     = 3'b101,
    EV_UNUSED  = 3'b110,  // code not assigned, no effect
    EV_NONE    = 3'b111   // no event signal active
  } event_t;

  // One-cycle Mealy pulses produced by the game FSM.
  typedef struct packed {
    logic ldpd;   // load Pattern Display step counter
    logic ldpm;   // load Pattern Matcher user-turn counter
    logic rinc;   // increment round counter
    logic slose;  // set LOSE latch
    logic swin;   // set WIN latch
    logic gmrst;  // game reset: clear latches and round, capture start address
  } fsm_pulses_t;

  localparam int unsigned ROUND_W = 4;  // round counter width (0..15)
  localparam int unsigned ADDR_W  = 8;  // random / start address width

endpackage
