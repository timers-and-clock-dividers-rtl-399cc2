// tone_fsm_tb: self-checking testbench for the tone state machine.
//
// Drives the key input and the two counter-zero flags with random values and
// compares state, state_next and spkr every cycle against a reference model
// written as the ordered transition table (first matching row wins, no match
// holds the state). Also checks the power-up state, and counts every table row
// taken so that a run that misses one fails.
module tone_fsm_tb;
  import tone_pkg::*;

  logic   clk = 1'b0;
  logic   k, c1_zero, c2_zero;
  state_t state, state_next;
  logic   spkr;

  int checks = 0, failures = 0;
  int cycles = 0;
  int row_hits [6];

  tone_fsm dut (
    .clk(clk), .k(k), .c1_zero(c1_zero), .c2_zero(c2_zero),
    .state(state), .state_next(state_next), .spkr(spkr)
  );

  always #5 clk = ~clk;

  // Ordered transition table: state, k, c1, c2 (-1 = don't care), next.
  typedef struct { state_t s; int k; int c1; int c2; state_t nxt; } row_t;
  row_t table_rows [6] = '{
    '{keylo,  1, -1, -1, keyhi },
    '{keyhi,  0, -1, -1, spkrlo},
    '{spkrlo, -1, 0, -1, keylo },
    '{spkrhi, -1, 0, -1, keylo },
    '{spkrlo, -1, -1, 0, spkrhi},
    '{spkrhi, -1, -1, 0, spkrlo}
  };

  state_t ref_state = keylo;

  function automatic int match_row(state_t s, logic kk, logic c1z, logic c2z);
    for (int i = 0; i < 6; i++) begin
      if (table_rows[i].s != s) continue;
      if (table_rows[i].k  != -1 && table_rows[i].k  != int'(kk)) continue;
      if (table_rows[i].c1 != -1 && table_rows[i].c1 != int'(!c1z)) continue;
      if (table_rows[i].c2 != -1 && table_rows[i].c2 != int'(!c2z)) continue;
      return i;
    end
    return -1;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycles, what);
    end
  endtask

  initial begin
    int r;
    state_t ref_next;
    k = 1'b0; c1_zero = 1'b0; c2_zero = 1'b0;
    #1;
    check(state == keylo, "power-up state is keylo");
    check(spkr == 1'b0, "speaker low at power-up");
    repeat (4000) begin
      @(negedge clk);
      // Random stimulus: the key changes now and then, c1 rarely reaches 0.
      if ($urandom_range(0, 3) == 0) k = ~k;
      c1_zero = ($urandom_range(0, 15) == 0);
      c2_zero = ($urandom_range(0, 2) == 0);
      #1;
      r = match_row(ref_state, k, c1_zero, c2_zero);
      ref_next = (r < 0) ? ref_state : table_rows[r].nxt;
      check(state == ref_state, $sformatf("state %s expected %s",
                                          state.name(), ref_state.name()));
      check(state_next == ref_next, $sformatf("state_next %s expected %s",
                                              state_next.name(), ref_next.name()));
      check(spkr == (ref_state == spkrhi), "spkr high only in spkrhi");
      if (r >= 0) row_hits[r]++;
      @(posedge clk);
      ref_state = ref_next;
      cycles++;
    end
    for (int i = 0; i < 6; i++)
      check(row_hits[i] > 0, $sformatf("transition table row %0d never taken", i));
    $display("rows taken: %p", row_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
