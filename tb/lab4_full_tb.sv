// lab4_full_tb: one complete operation of the tone generator at its default
// size: 50 MHz clock, key 4, 1000 Hz for 3 s.
//
// Key 4 (second row, first column) is pressed briefly through the keypad
// model. The testbench then times the speaker pin: the tone must last
// exactly N = 3 s * 50 MHz = 150,000,000 clock cycles from the first clock
// edge that sees the key, with every half period exactly
// M = 50 MHz / (2 * 1000 Hz) = 25,000 cycles (6000 halves, 3000 high
// pulses), and the pin must stay low afterwards. Only the run lengths are
// checked, once per pin change, so that the 150 million cycles simulate
// quickly.
module lab4_full_tb;

  localparam longint N = 150_000_000;
  localparam longint M = 25_000;

  logic       clk = 1'b0;
  always #10 clk = ~clk;   // 20 ns period

  logic [3:0] row, col;
  logic       spkr, led;
  logic       press = 1'b0;

  lab4 dut (.clk50(clk), .col(col), .row(row), .spkr(spkr), .led(led));
  keypad_model kp (.row(row), .press(press), .key_r(1), .key_c(0), .col(col));

  int checks = 0, failures = 0;
  longint cycle = 0;
  longint start = -1;      // cycle of the edge that sampled the press
  longint last_change = 0;
  bit     prev_spkr = 1'b0;
  int     halves = 0, highs = 0, bad_halves = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  always @(posedge clk) begin
    cycle++;
    if (start < 0 && press && col[0] == 1'b0) start = cycle;
  end

  // Time each run of the speaker pin (sampled after the edge settles).
  always @(negedge clk) begin
    if (spkr != prev_spkr) begin
      if (spkr) begin
        highs++;
        // the low run before a rise is one half period
        if (halves == 0) check(cycle - start == M, "first low half is M cycles");
        else if (cycle - last_change != M) bad_halves++;
      end else if (cycle - last_change != M) bad_halves++;
      halves++;
      last_change = cycle;
      prev_spkr = spkr;
    end
  end

  initial begin
    repeat (100) @(negedge clk);
    check(spkr == 1'b0 && row == 4'b1101, "idle: speaker low, row 1 driven");
    press = 1'b1;
    repeat (1000) @(negedge clk);
    check(led == 1'b1, "LED shows the pressed key");
    press = 1'b0;
    // Wait past the end of the tone.
    wait (cycle >= start + N + 10);
    @(negedge clk);
    // The tone ran N cycles: 6000 half periods of M; it ends after a high
    // half, so the pin returns low exactly N cycles after the start.
    check(last_change - start == N, $sformatf("tone lasted %0d cycles, expected %0d",
                                              last_change - start, N));
    check(bad_halves == 0, $sformatf("%0d half periods not %0d cycles", bad_halves, M));
    check(highs == 3000, $sformatf("%0d high pulses, expected 3000", highs));
    check(spkr == 1'b0, "speaker low after the tone");
    $display("tone %0d cycles, %0d high pulses, %0d pin changes", last_change - start, highs, halves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (151_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
