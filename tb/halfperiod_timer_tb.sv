// halfperiod_timer_tb: self-checking testbench for the half-period counter.
//
// Part 1 drives random (state, state_next) pairs and compares count and zero
// every cycle with a reference written from the counter's table: load M-1 on
// keyhi -> spkrlo, spkrhi -> spkrlo and spkrlo -> spkrhi, else decrement when
// the next state is spkrlo or spkrhi, else hold. Part 2 runs a small model of
// the controller around the counter and checks that every half period of the
// square wave lasts exactly M cycles. M is kept small for a short run.
module halfperiod_timer_tb;
  import tone_pkg::*;

  localparam longint unsigned M = 6;
  localparam int unsigned     W = 3;

  logic         clk = 1'b0;
  state_t       state, state_next;
  logic [W-1:0] count;
  logic         zero;

  int checks = 0, failures = 0;
  int loads = 0, decs = 0, holds = 0;
  longint unsigned ref_c2 = 0;

  halfperiod_timer #(.M(M), .W(W)) dut (
    .clk(clk), .state(state), .state_next(state_next),
    .count(count), .zero(zero)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %t: %s", $time, what);
    end
  endtask

  function automatic longint unsigned next_c2(longint unsigned c, state_t s, state_t sn);
    if (s == keyhi  && sn == spkrlo) return M - 1;
    if (s == spkrhi && sn == spkrlo) return M - 1;
    if (s == spkrlo && sn == spkrhi) return M - 1;
    if (sn == spkrlo || sn == spkrhi) return (c - 1) & ((1 << W) - 1);
    return c;
  endfunction

  task automatic step(state_t s, state_t sn);
    @(negedge clk);
    state = s; state_next = sn;
    @(posedge clk);
    if (next_c2(ref_c2, s, sn) == M - 1 && s != sn && sn inside {spkrlo, spkrhi}) loads++;
    else if (sn == spkrlo || sn == spkrhi) decs++;
    else holds++;
    ref_c2 = next_c2(ref_c2, s, sn);
    #1;
    check(count == W'(ref_c2), $sformatf("count %0d expected %0d", count, ref_c2));
    check(zero == (ref_c2 == 0), "zero flag");
  endtask

  initial begin
    state_t s;
    int run, halves;
    state = keylo; state_next = keylo;
    #1;
    check(count == 0 && zero, "power-up value 0");
    // Part 1: random pairs.
    repeat (3000) step(state_t'($urandom_range(0, 3)), state_t'($urandom_range(0, 3)));
    // Part 2: toggle on zero, like the controller, and time each half period.
    step(keylo, keyhi);
    step(keyhi, spkrlo);
    s = spkrlo; run = 1; halves = 0;
    repeat (10 * M) begin
      if (zero) begin
        check(run == M, $sformatf("half period of %0d cycles, expected %0d", run, M));
        halves++;
        step(s, (s == spkrlo) ? spkrhi : spkrlo);
        s = (s == spkrlo) ? spkrhi : spkrlo;
        run = 1;
      end else begin
        step(s, s);
        run++;
      end
    end
    check(halves >= 8, $sformatf("only %0d half periods seen", halves));
    check(loads > 0 && decs > 0 && holds > 0, "load, decrement and hold all exercised");
    $display("loads=%0d decrements=%0d holds=%0d halves=%0d", loads, decs, holds, halves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
