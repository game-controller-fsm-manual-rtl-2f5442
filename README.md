# Simon Says game controller

In a Simon Says game the machine shows a colour sequence and the player
repeats it. Each round the sequence grows by one step. This RTL is the
controller that tracks where a game stands. Two other subsystems do the rest:

- the **Pattern Display** plays the sequence from an EPROM;
- the **Pattern Matcher** compares the player's presses with the sequence.

The controller does not store the sequence or check presses itself. It reads a
few events from those two subsystems and from the START button, then tells
them what to do on the next clock edge: load a counter, set an indicator,
advance the round, hold, or start over. Next to the state machine there is a
4-bit round counter, and an 8-bit random start address that makes every game
begin at a different place in the sequence memory.

## Lifecycle of a game

```
            START / LDPD,GMRST            PD_FIN / LDPM
   IDLE  ------------------------>  PLAY ---------------> USER
    ^  ^                             ^                     |
    |  |                             |  ADV / LDPD,RINC    |
    |  |                             +---------------------+
    |  +------------ WIN / SWIN -----------------------------+
    +--------------- LOSE / SLOSE ---------------------------+
   BLNK (10) --- any event ---> IDLE   (recovery only)
```

| State | {Q0,Q1} | Meaning |
|-------|---------|---------|
| IDLE  | 00 | waiting for START; rest state after a game |
| PLAY  | 01 | the Pattern Display shows the sequence |
| USER  | 11 | the player presses buttons; the Pattern Matcher checks them |
| BLNK  | 10 | never entered normally; leads to IDLE on the next clock |

Any combination that is not listed above holds the state and fires no pulse.
Examples: START in PLAY, PD_FIN in USER, or any event other than START in IDLE.
A correct press in the middle of a round is handled inside the Pattern
Matcher, so the controller sees no event and stays in USER.

## Event codes and the encoder

The state machine reads a 3-bit event code (shown MSB first):

| Code | Event | Code | Event |
|------|-------|------|-------|
| 000 | START | 100 | ADV (round done, more rounds remain) |
| 001 | PD_FIN (sequence shown) | 101 | WIN (round 15 done) |
| 010 | LOSE (wrong press or timeout) | 110 | unassigned: hold |
| 011 | correct mid-round press: hold | 111 | no event: hold |

`event_encoder` builds the code from five separate event lines. It relies on
the game never raising two events at once, so it needs no priority logic:

```
code[0] = pd_fin | win      code[1] = lose      code[2] = adv | win
```

START has code 000, so its input drives nothing. This has one consequence you
must know before driving the design: **with no event line raised, the code
reads as START**. A clock edge in IDLE with all inputs low therefore starts a
game. The encoder has no "group select" output that would tell "START" apart
from "nothing". Whatever drives the controller must assert a real event on
every clock edge it wants to act on. In IDLE it must clock only when a game
should start. A priority encoder with a separate valid output (for example a
74LS148 and its GS pin) would remove this limitation. It is not included.

## Outputs and their timing

| Signal | Kind | High when | Used for |
|--------|------|-----------|----------|
| `playd` | Moore level | state is PLAY | Pattern Display enable, LED bank |
| `userd` | Moore level | state is USER | Pattern Matcher enable, EPROM address mux select |
| `ldpd`  | Mealy pulse | IDLE+START, USER+ADV | load the Pattern Display step counter with `start_address` |
| `ldpm`  | Mealy pulse | PLAY+PD_FIN | load the Pattern Matcher's turn counter |
| `rinc`  | Mealy pulse | USER+ADV | increment the round counter |
| `slose` | Mealy pulse | USER+LOSE | set the LOSE indicator |
| `swin`  | Mealy pulse | USER+WIN | set the WIN indicator |
| `gmrst` | Mealy pulse | IDLE+START | clear indicators and round count, capture a new start address |

The Mealy pulses are combinational from the state and the current event code.
They are valid during the cycle *before* the clock edge that makes the
transition. Blocks that use them as enables act on that same edge. A pulse
lasts one cycle if the event is presented for one cycle. The state, the round
count, the indicators and the start address all change on that edge.
Inside the design the pulses travel as one packed struct,
`simon_pkg::fsm_pulses_t`. At the top level they come out as separate ports.

## Round counter and the final round

`round_counter` counts completed rounds, from 0 to 15:

- `rinc` increments it;
- `gmrst` clears it at the start of each game;
- reset clears it at once.

`max_rnd` is high while the count is 15. Whatever produces the events (in the
complete machine, the Pattern Matcher's side) must then raise WIN instead of
ADV when the player completes the next round. So a won game is: START, then 15
times (PD_FIN, ADV), then PD_FIN and WIN. The count stays at its final value
after WIN or LOSE until the next START clears it.

## Random start address

`random_counter` is an 8-bit up counter on its own clock, `fast_clk`. It runs
all the time, is cleared only by reset, and exposes its live value as
`strt_adr`. When a game starts, `start_addr_reg` loads that value into
`start_address` on the game-clock edge where `gmrst` is high. It keeps the
value for the whole game, so every `ldpd` reloads the Pattern Display from the
same address. The randomness comes from when the player presses START,
measured against a counter that spins much faster than anyone can react.

`strt_adr` crosses from the `fast_clk` domain into the game-clock domain with
no synchronizer. This is deliberate. If the counter changes just as it is
sampled, the register may catch a mix of old and new bits. That mixed value is
still a valid and unpredictable address. Metastability is not otherwise
handled. If you use this on real silicon with unrelated clocks, you may want
two synchronizing flip-flops, or a Gray-coded counter.

## Reset

`rst` is active high and asynchronous. It acts on every register at once,
without a clock edge: the state goes to IDLE, and the indicators, round count,
random counter and start address all go to 0.

## Where this RTL departs from the gate-level original

The original machine is built from TTL parts. Several of its registers are
clocked directly by control pulses. This RTL uses one game clock instead:

- **Round counter:** the original counts on rising edges of RINC and is
  cleared by GMRST or RESET. Here it is a synchronous counter on the game
  clock, with `rinc` as the increment enable and `gmrst` as a synchronous
  clear.
- **Start address:** the original captures on the rising edge of GMRST. Here
  `gmrst` is a load enable on the game clock. The capture therefore happens at
  the clock edge that starts the game, not when START is pressed.
- **Indicators:** `result_latches` builds the WIN and LOSE latches as clocked
  set/clear flip-flops.
- **Next-state logic:** the original uses minimised JK flip-flop equations.
  Here it is a `case` statement with the same behaviour, including the
  recovery from BLNK to IDLE for every event code.
- **Priority encoder:** the breadboard version replaces `event_encoder` with a
  74LS148. That part is not modelled.

The design also assumes or chooses some details that the original leaves open:
the reset polarity, that the random counter counts up, and that clear beats
set (or increment) in the same cycle. Set and clear never happen in the same
cycle during a game.

## Files

| File | Contents |
|------|----------|
| `rtl/simon_pkg.sv` | state and event enums, pulse struct, widths |
| `rtl/event_encoder.sv` | five event lines to 3-bit code |
| `rtl/game_fsm.sv` | state register, next-state logic, Moore and Mealy outputs |
| `rtl/round_counter.sv` | 4-bit round counter with `max_rnd` |
| `rtl/random_counter.sv` | 8-bit free-running counter on `fast_clk` |
| `rtl/start_addr_reg.sv` | 8-bit start address register |
| `rtl/result_latches.sv` | WIN / LOSE indicators |
| `rtl/game_controller.sv` | top level wiring everything together |
| `tb/tb_<block>.sv` | one self-checking testbench per module |

The top level carries two assertions: at most one event input is high at a
clock edge, and WIN and LOSE are never both lit.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends any testbench that hangs and counts that as a failure. Example with
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/simon_pkg.sv tb/tb_game_controller.sv --top-module tb_game_controller
./obj_dir/Vtb_game_controller
```

Replace the testbench name to run the others. Give `simon_pkg.sv` first,
because every module imports it.

`tb_game_controller` runs the top level at its default sizes. It acts as the
Pattern Display and Pattern Matcher and plays several games:

- a full game won after 15 rounds;
- a restart straight after the win;
- a game lost in round 3;
- holds in every state;
- a game started by an idle clock edge;
- twelve random games;
- an asynchronous reset in mid-game;
- forced entries into BLNK.

A reference model checks the state, pulses, round count, indicators and start
address on every cycle. The testbench counts how often each of these
mechanisms happened, and fails if any never did.

The unit testbenches cover each block on its own:

- `tb_game_fsm`: every state against all eight event codes, recovery from
  BLNK, and asynchronous reset;
- `tb_round_counter`: wrap-around, `max_rnd`, and clears;
- `tb_random_counter`: one step per edge, wrap-around, and reset;
- `tb_start_addr_reg`: capture versus hold;
- `tb_result_latches`: set, hold and clear;
- `tb_event_encoder`: every input combination.

The tests that check BLNK recovery use `force` on the state register. BLNK
cannot be reached any other way.
