// lab4: keypad-triggered tone generator.
//
// Pressing one chosen key of a 4x4 matrix keypad plays a square-wave tone of
// a fixed frequency for a fixed time on a speaker pin, however long the key
// is held. The design is customised by three digits n1, n2, n3: key n1
// triggers a tone of f = 500 + 100*n2 Hz lasting 0.5*n3 s. The defaults
// (n1=4, n2=5, n3=6, 50 MHz clock) give a 1000 Hz tone for 3 s.
//
// How it works: the row of key n1 is driven low and all other rows high; the
// column of key n1 (pulled up) is the key input k, low while the key is
// pressed. tone_fsm waits for a release and then a press, and then
// alternates spkrlo/spkrhi. duration_timer (c1, N cycles) ends the tone;
// halfperiod_timer (c2, M cycles) toggles the speaker every half period.
//   N = CLK_HZ * 0.5 * n3        (150,000,000 by default, 28 bits)
//   M = CLK_HZ / (2 * f)         (25,000 by default, 15 bits)
// spkr is low whenever no tone is playing. Since only one key is scanned, the
// row outputs are constant and synthesis ties them off.
//
// Interface: clk50 is the board clock; row[3:0] drives the keypad rows and
// col[3:0] reads its columns (pulled up, low through a pressed key); spkr
// drives the speaker; led shows the key input (high while key n1 is pressed)
// for troubleshooting.
//
// Timing: the tone starts on the first clock edge that sees k low after a
// release, lasts exactly N clock cycles, and each half period lasts M cycles
// (the first half, after the press, is low). There is no input synchroniser
// or debouncing, as in the original design; a bounce during the tone is
// ignored, but a bounce on release after the tone ends can start a new tone.
//
// Following the original: the state machine, both counter tables, the pin set
// (clk50, row, col, spkr, led) and the formulas for N and M. This design's
// own choices: the keypad layout used to find key n1 (see tone_pkg), what the
// LED shows, the power-up values in place of a reset pin, and rounding M down
// when CLK_HZ/(2f) is not a whole number.
module lab4
  import tone_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned N1     = 4,
  parameter int unsigned N2     = 5,
  parameter int unsigned N3     = 6
) (
  input  logic       clk50,
  input  logic [3:0] col,
  output logic [3:0] row,
  output logic       spkr,
  output logic       led
);

  localparam longint unsigned N      = duration_cycles(CLK_HZ, N3);
  localparam longint unsigned M      = halfperiod_cycles(CLK_HZ, N2);
  localparam int unsigned     W1     = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned     W2     = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned     KEYROW = key_row(N1);
  localparam int unsigned     KEYCOL = key_col(N1);

  state_t        state, state_next;
  logic          k;
  logic          c1_zero, c2_zero;

  // Scan only the row of key n1; a key in another row cannot pull the
  // selected column low.
  always_comb begin
    row         = '1;
    row[KEYROW] = 1'b0;
  end

  assign k   = col[KEYCOL];
  assign led = ~k;

  tone_fsm u_fsm (
    .clk       (clk50),
    .k         (k),
    .c1_zero   (c1_zero),
    .c2_zero   (c2_zero),
    .state     (state),
    .state_next(state_next),
    .spkr      (spkr)
  );

  duration_timer #(.N(N), .W(W1)) u_c1 (
    .clk       (clk50),
    .state     (state),
    .state_next(state_next),
    .count     (),           // value only needed by the comparison
    .zero      (c1_zero)
  );

  halfperiod_timer #(.M(M), .W(W2)) u_c2 (
    .clk       (clk50),
    .state     (state),
    .state_next(state_next),
    .count     (),
    .zero      (c2_zero)
  );

endmodule
