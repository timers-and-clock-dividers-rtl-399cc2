// tone_fsm: key-press detector and tone sequencer.
//
// A four-state machine. In keylo it waits for the key input k to go high
// (key released), in keyhi for k to go low (key pressed). A press starts the
// tone in spkrlo. While the duration counter c1 is non-zero the machine
// toggles between spkrlo and spkrhi every time the half-period counter c2
// reaches zero; once c1 reaches zero it returns to keylo, from both tone
// states. The first matching condition wins (so c1 == 0 takes priority over
// c2 == 0) and the state holds when none matches. Because keylo needs a
// release first, a key held past the end of the tone does not start another.
//
// Interface: k is active low (0 while the key is pressed). c1_zero/c2_zero
// report the two counters. state is the register, state_next the
// combinational next state; the counters use both. spkr is high in spkrhi
// only and comes straight from the state register, so it has no glitches.
//
// Timing: state changes on the rising clock edge after its condition holds.
// The transitions, their priority and the speaker decode follow the original
// design. The state register has a power-up value of keylo instead of a reset
// input, since the pin list has no reset pin (the CPLD clears its registers
// at power-up); that choice is this design's own.
module tone_fsm
  import tone_pkg::*;
(
  input  logic   clk,
  input  logic   k,
  input  logic   c1_zero,
  input  logic   c2_zero,
  output state_t state,
  output state_t state_next,
  output logic   spkr
);

  state_t state_q = keylo;

  always_comb begin
    state_next = state_q;
    unique case (state_q)
      keylo:  if (k)        state_next = keyhi;
      keyhi:  if (!k)       state_next = spkrlo;
      spkrlo: if (c1_zero)  state_next = keylo;
              else if (c2_zero) state_next = spkrhi;
      spkrhi: if (c1_zero)  state_next = keylo;
              else if (c2_zero) state_next = spkrlo;
    endcase
  end

  always_ff @(posedge clk) state_q <= state_next;

  assign state = state_q;
  assign spkr  = (state_q == spkrhi);

endmodule
