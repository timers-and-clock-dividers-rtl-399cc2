// duration_timer: the tone-duration counter (c1).
//
// A down-counter that sets how long the tone lasts. It loads N-1 when the
// controller goes from keyhi to spkrlo (the key press), decrements by one on
// every clock whose next state is spkrlo or spkrhi, and holds otherwise. It
// therefore counts N-1 .. 0 over the N cycles the controller spends in the
// two tone states; zero reports the last of them, and the controller leaves
// the tone states on the following edge.
//
// Interface: state/state_next from tone_fsm; count is the counter value and
// zero is (count == 0).
//
// The load/decrement table is the original design's. N defaults to 3 s at
// 50 MHz (150,000,000 cycles, 28 bits). The power-up value of 0 replaces a
// reset input; that is this design's choice.
module duration_timer
  import tone_pkg::*;
#(
  parameter longint unsigned N = 150_000_000,
  parameter int unsigned     W = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  state_t       state,
  input  state_t       state_next,
  output logic [W-1:0] count,
  output logic         zero
);

  localparam logic [W-1:0] LOAD = W'(N - 1);

  logic [W-1:0] c1 = '0;

  always_ff @(posedge clk) begin
    if (state == keyhi && state_next == spkrlo)
      c1 <= LOAD;
    else if (state_next == spkrlo || state_next == spkrhi)
      c1 <= c1 - 1'b1;
  end

  assign count = c1;
  assign zero  = (c1 == '0);

endmodule
