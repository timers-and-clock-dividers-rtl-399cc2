// tone_pkg: types and constants shared by the keypad tone generator.
//
// The generator has four states. keylo waits for the key to be released,
// keyhi waits for it to be pressed, and spkrlo/spkrhi are the low and high
// halves of the square wave while the tone sounds. The state names follow the
// original design; the 2-bit encoding is this design's choice, picked so that
// every value of the register is a legal state.
//
// The helper functions turn the three customisation digits (n1, n2, n3) into
// the keypad position of the trigger key and into the two timer lengths:
//   tone frequency  f = 500 + 100*n2 Hz
//   tone duration   0.5*n3 s
//   N = duration / clock period      (cycles the tone lasts)
//   M = (1/f)/2 / clock period       (cycles per half period of the tone)
// The keypad layout (1 2 3 A / 4 5 6 B / 7 8 9 C / * 0 # D, row 0 and column
// 0 at the top left) is an assumption of this design.
package tone_pkg;

  typedef enum logic [1:0] {
    keylo  = 2'd0,
    keyhi  = 2'd1,
    spkrlo = 2'd2,
    spkrhi = 2'd3
  } state_t;

  // Tone frequency in Hz for digit n2.
  function automatic int unsigned tone_hz(int unsigned n2);
    return 500 + 100 * n2;
  endfunction

  // N: tone duration of 0.5*n3 seconds in clock cycles. At least 1, so that
  // a zero duration still gives a valid counter load of N-1 = 0.
  function automatic longint unsigned duration_cycles(int unsigned clk_hz,
                                                      int unsigned n3);
    longint unsigned n;
    n = (longint'(clk_hz) * n3) / 2;
    return (n == 0) ? 1 : n;
  endfunction

  // M: half of the tone period in clock cycles (rounded down, at least 1).
  function automatic longint unsigned halfperiod_cycles(int unsigned clk_hz,
                                                        int unsigned n2);
    longint unsigned m;
    m = longint'(clk_hz) / (2 * tone_hz(n2));
    return (m == 0) ? 1 : m;
  endfunction

  // Keypad row (0 = top) of the key labelled with decimal digit d.
  function automatic int unsigned key_row(int unsigned d);
    return (d == 0) ? 3 : (d - 1) / 3;
  endfunction

  // Keypad column (0 = left) of the key labelled with decimal digit d.
  function automatic int unsigned key_col(int unsigned d);
    return (d == 0) ? 1 : (d - 1) % 3;
  endfunction

endpackage
