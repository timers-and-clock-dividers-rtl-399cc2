// halfperiod_timer: the clock divider that sets the tone frequency (c2).
//
// A down-counter that measures half a period of the tone. It loads M-1 when
// the tone starts (keyhi to spkrlo) and whenever the controller changes
// between spkrlo and spkrhi, decrements by one on every other clock whose
// next state is spkrlo or spkrhi, and holds otherwise. Each half of the
// square wave therefore lasts M clock cycles: the counter runs M-1 .. 0,
// zero makes the controller toggle the speaker, and the toggle reloads it.
//
// Interface: state/state_next from tone_fsm; count is the counter value and
// zero is (count == 0).
//
// The load/decrement table is the original design's. M defaults to half a
// period of 1000 Hz at 50 MHz (25,000 cycles, 15 bits). The power-up value of
// 0 replaces a reset input; that is this design's choice.
module halfperiod_timer
  import tone_pkg::*;
#(
  parameter longint unsigned M = 25_000,
  parameter int unsigned     W = (M > 1) ? $clog2(M) : 1
) (
  input  logic         clk,
  input  state_t       state,
  input  state_t       state_next,
  output logic [W-1:0] count,
  output logic         zero
);

  localparam logic [W-1:0] LOAD = W'(M - 1);

  logic [W-1:0] c2 = '0;

  always_ff @(posedge clk) begin
    if ((state == keyhi  && state_next == spkrlo) ||
        (state == spkrhi && state_next == spkrlo) ||
        (state == spkrlo && state_next == spkrhi))
      c2 <= LOAD;
    else if (state_next == spkrlo || state_next == spkrhi)
      c2 <= c2 - 1'b1;
  end

  assign count = c2;
  assign zero  = (c2 == '0);

endmodule
