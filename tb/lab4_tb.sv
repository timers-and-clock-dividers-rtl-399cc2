// lab4_tb: end-to-end testbench for the keypad tone generator.
//
// Two copies of the generator run side by side at reduced clock rates so the
// tones are short, each with its own keypad model:
//   A: CLK_HZ=20000, key 4, 1000 Hz, 3 s   -> M=10, N=60000 (ends in spkrhi)
//   B: CLK_HZ=27000, key 9, 1000 Hz, 0.5 s -> M=13, N=13500 (ends in spkrlo)
// The expected N, M and key positions are worked out here from the
// specification, not taken from the design. Every clock cycle the speaker
// pin is compared with the expected square wave: after the clock edge that
// first sees the key pressed (following a release), cycle i < N of the tone
// is high when (i / M) is odd, and the pin is low at all other times.
// Scenarios, for each copy: a press shorter than the tone, a press longer
// than the tone (no second tone while held), a key press repeated during the
// tone (ignored), and keys in another row and column, in the same row and in
// the same column (no tone). Row drive and the LED are checked too. Each
// mechanism is counted and one that never happens counts as a failure.
module lab4_tb;

  // Copy parameters: clock, n1, n2, n3.
  localparam int unsigned CLK_A = 20000, N1_A = 4, N2_A = 5, N3_A = 6;
  localparam int unsigned CLK_B = 27000, N1_B = 9, N2_B = 5, N3_B = 1;

  // Expected sizes, from f = 500 + 100*n2 and a duration of 0.5*n3 s.
  localparam int NA = CLK_A * N3_A / 2;                  // 60000
  localparam int MA = CLK_A / (2 * (500 + 100 * N2_A));  // 10
  localparam int NB = CLK_B * N3_B / 2;                  // 13500
  localparam int MB = CLK_B / (2 * (500 + 100 * N2_B));  // 13

  // Keypad layout: rows top to bottom, columns left to right.
  localparam string LAYOUT [4] = '{"123A", "456B", "789C", "*0#D"};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] row [2], col [2];
  logic       spkr [2], led [2];
  logic       press [2];
  int unsigned kr [2], kc [2];

  lab4 #(.CLK_HZ(CLK_A), .N1(N1_A), .N2(N2_A), .N3(N3_A)) dut_a (
    .clk50(clk), .col(col[0]), .row(row[0]), .spkr(spkr[0]), .led(led[0]));
  lab4 #(.CLK_HZ(CLK_B), .N1(N1_B), .N2(N2_B), .N3(N3_B)) dut_b (
    .clk50(clk), .col(col[1]), .row(row[1]), .spkr(spkr[1]), .led(led[1]));

  keypad_model kp_a (.row(row[0]), .press(press[0]), .key_r(kr[0]), .key_c(kc[0]), .col(col[0]));
  keypad_model kp_b (.row(row[1]), .press(press[1]), .key_r(kr[1]), .key_c(kc[1]), .col(col[1]));

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_tones [2] = '{0, 0};  // tones started by a press, per copy
  int n_rise = 0;         // spkrlo -> spkrhi toggles
  int n_fall = 0;         // spkrhi -> spkrlo toggles
  int n_end_hi = 0;       // tone ended from the high half
  int n_end_lo = 0;       // tone ended from the low half
  int n_held = 0;         // key still held when the tone ended
  int n_repress = 0;      // presses during a tone that were ignored
  int n_other = 0;        // presses of other keys that gave no tone

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %t: %s", $time, what);
    end
  endtask

  function automatic void find_key(int unsigned d, output int unsigned r, output int unsigned c);
    byte ch = byte'("0" + d);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        if (LAYOUT[i][j] == ch) begin r = i; c = j; end
  endfunction

  // Expected speaker model per copy: tone position, -1 when idle.
  int  pos [2] = '{-1, -1};
  bit  armed [2] = '{0, 0};   // key seen released since the last tone
  bit  tone_key [2];          // the key driven is the trigger key

  // Runs on every rising edge: compares the pin, then advances the model.
  // The pins are settled before the edge (stimulus changes on the falling
  // edge), so what the design samples is what the model samples.
  task automatic edge_model(int d, int n, int m, bit k_low);
    int p_prev;
    // pin during the cycle that ends now
    check(spkr[d] == (pos[d] >= 0 && ((pos[d] / m) % 2 == 1)),
          $sformatf("copy %0d speaker %0b at tone position %0d", d, spkr[d], pos[d]));
    p_prev = pos[d];
    if (pos[d] >= 0) begin
      if (pos[d] == n - 1) begin
        if (((pos[d] / m) % 2) == 1) n_end_hi++; else n_end_lo++;
        if (k_low) n_held++;
        pos[d] = -1;
        armed[d] = 0;
      end else begin
        pos[d]++;
        if (pos[d] % m == 0) begin
          if (((pos[d] / m) % 2) == 1) n_rise++; else n_fall++;
        end
      end
    end else if (!k_low) begin
      armed[d] = 1;
    end else if (armed[d]) begin
      pos[d] = 0;
      n_tones[d]++;
    end
  endtask

  always @(posedge clk) begin
    edge_model(0, NA, MA, press[0] && tone_key[0]);
    edge_model(1, NB, MB, press[1] && tone_key[1]);
  end

  // Press key `d` on copy `c` for `len` cycles, then release and wait `gap`.
  task automatic press_key(int c, int unsigned d, int len, int gap);
    int unsigned r, cc, tr, tc;
    find_key(d, r, cc);
    find_key(c == 0 ? N1_A : N1_B, tr, tc);
    @(negedge clk);
    kr[c] = r; kc[c] = cc; press[c] = 1'b1;
    tone_key[c] = (r == tr && cc == tc);
    repeat (2) @(negedge clk);
    check(led[c] == tone_key[c], $sformatf("copy %0d LED shows the trigger key", c));
    repeat (len - 2) @(negedge clk);
    press[c] = 1'b0;
    repeat (gap) @(negedge clk);
  endtask

  // Run one copy's scenarios.
  task automatic scenario(int c, int unsigned key, int n, int m);
    int unsigned r, cc;
    int t0;
    find_key(key, r, cc);
    @(negedge clk);
    // Row drive: only the trigger key's row is low.
    check(row[c] == ~(4'b1 << r), $sformatf("copy %0d row drive %b", c, row[c]));
    // Idle: speaker low.
    repeat (20) @(negedge clk);
    check(led[c] == 1'b0, "LED off with no key pressed");
    // 1. Short press.
    t0 = n_tones[c];
    press_key(c, key, 3 * m, n);
    check(n_tones[c] == t0 + 1, $sformatf("copy %0d short press gives one tone", c));
    // 2. Long press: held for the tone and beyond, no second tone.
    t0 = n_tones[c];
    press_key(c, key, n + 5 * m, 20);
    check(n_tones[c] == t0 + 1, $sformatf("copy %0d long press gives one tone", c));
    // 3. Press, release and press again during the tone: ignored.
    t0 = n_tones[c];
    press_key(c, key, m, 2 * m);
    press_key(c, key, m, n);
    n_repress++;
    check(n_tones[c] == t0 + 1, $sformatf("copy %0d second press during the tone ignored", c));
    // 4. Other keys: other row and column, same row, same column.
    t0 = n_tones[c];
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        if (i != r || j != cc) begin
          // drive the model directly: not every key is a digit
          @(negedge clk);
          kr[c] = i; kc[c] = j; press[c] = 1'b1; tone_key[c] = 1'b0;
          repeat (3 * m) @(negedge clk);
          check(led[c] == 1'b0, "LED stays off for another key");
          press[c] = 1'b0;
          repeat (m) @(negedge clk);
          n_other++;
        end
    check(n_tones[c] == t0, $sformatf("copy %0d other keys give no tone", c));
  endtask

  initial begin
    press = '{0, 0};
    kr = '{0, 0}; kc = '{0, 0};
    tone_key = '{0, 0};
    check(NA == 60000 && MA == 10 && NB == 13500 && MB == 13, "test sizes");
    fork
      scenario(0, N1_A, NA, MA);
      scenario(1, N1_B, NB, MB);
    join
    repeat (10) @(negedge clk);
    $display("tones=%0d+%0d rises=%0d falls=%0d end_hi=%0d end_lo=%0d held=%0d repress=%0d other_keys=%0d",
             n_tones[0], n_tones[1], n_rise, n_fall, n_end_hi, n_end_lo, n_held, n_repress, n_other);
    check(n_tones[0] == 3 && n_tones[1] == 3, "three tones per copy");
    check(n_rise > 0,    "speaker rise happened");
    check(n_fall > 0,    "speaker fall happened");
    check(n_end_hi > 0,  "tone ended from the high half");
    check(n_end_lo > 0,  "tone ended from the low half");
    check(n_held > 0,    "key held past the end of a tone");
    check(n_repress > 0, "press during a tone");
    check(n_other > 0,   "other keys pressed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
