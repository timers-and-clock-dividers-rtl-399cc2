// duration_timer_tb: self-checking testbench for the tone-duration counter.
//
// Part 1 drives random (state, state_next) pairs and compares count and zero
// every cycle with a reference written from the counter's table: load N-1 on
// keyhi -> spkrlo, else decrement when the next state is spkrlo or spkrhi,
// else hold. Part 2 plays one tone the way the controller does and checks
// that zero is first seen exactly N-1 cycles after the load, so the tone
// lasts N cycles. N is kept small for a short run.
module duration_timer_tb;
  import tone_pkg::*;

  localparam longint unsigned N = 13;
  localparam int unsigned     W = 4;

  logic         clk = 1'b0;
  state_t       state, state_next;
  logic [W-1:0] count;
  logic         zero;

  int checks = 0, failures = 0;
  int loads = 0, decs = 0, holds = 0;
  longint unsigned ref_c1 = 0;

  duration_timer #(.N(N), .W(W)) dut (
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

  // Reference: next value of c1 from the table.
  function automatic longint unsigned next_c1(longint unsigned c, state_t s, state_t sn);
    if (s == keyhi && sn == spkrlo) return N - 1;
    if (sn == spkrlo || sn == spkrhi) return (c - 1) & ((1 << W) - 1);
    return c;
  endfunction

  task automatic step(state_t s, state_t sn);
    @(negedge clk);
    state = s; state_next = sn;
    @(posedge clk);
    if (s == keyhi && sn == spkrlo) loads++;
    else if (sn == spkrlo || sn == spkrhi) decs++;
    else holds++;
    ref_c1 = next_c1(ref_c1, s, sn);
    #1;
    check(count == W'(ref_c1), $sformatf("count %0d expected %0d", count, ref_c1));
    check(zero == (ref_c1 == 0), "zero flag");
  endtask

  initial begin
    int t;
    state = keylo; state_next = keylo;
    #1;
    check(count == 0 && zero, "power-up value 0");
    // Part 1: random pairs.
    repeat (3000) step(state_t'($urandom_range(0, 3)), state_t'($urandom_range(0, 3)));
    // Part 2: one tone, as the controller runs it.
    step(keylo, keyhi);
    step(keyhi, spkrlo);
    check(count == W'(N - 1), "load value N-1");
    t = 0;
    while (!zero && t < 100) begin
      step((t % 2) ? spkrhi : spkrlo, (t % 2) ? spkrlo : spkrhi);
      t++;
    end
    check(t == N - 1, $sformatf("zero reached after %0d cycles, expected %0d", t, N - 1));
    step(spkrhi, keylo);
    check(count == 0, "holds at 0 after the tone");
    check(loads > 0 && decs > 0 && holds > 0, "load, decrement and hold all exercised");
    $display("loads=%0d decrements=%0d holds=%0d", loads, decs, holds);
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
