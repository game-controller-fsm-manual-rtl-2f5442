// event_encoder: turns the five game-event inputs into the 3-bit event code
// consumed by the game FSM.
//
// The events are mutually exclusive by construction of the game (only one can
// happen in a given state), so no priority chain is needed: one combinational
// layer of two OR gates and a wire.
//   code[0] (LSB) = pd_fin | win
//   code[1]       = lose
//   code[2] (MSB) = adv | win
// START has code 000, which is also what comes out when nothing is asserted,
// so the start input drives no logic. It stays a port so that the event has a
// place on the interface; as a consequence an idle input set reads as START
// (there is no group-select output distinguishing the two). The encoder never
// produces the codes 011, 110 or 111. The mapping is the original one; keeping
// the unused START port is this design's choice, so lint's unused-signal
// warning on it stands.
//
// Interface: purely combinational, no clock.
module event_encoder
  import simon_pkg::*;
(
  input  logic   start,
  input  logic   pd_fin,
  input  logic   lose,
  input  logic   adv,
  input  logic   win,
  output event_t code
);

  always_comb begin
    code = event_t'({adv | win, lose, pd_fin | win});
  end

endmodule
