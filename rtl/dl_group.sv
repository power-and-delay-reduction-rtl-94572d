// dl_group: one upper group of the D-latch carry select adder.
//
// A conventional carry select group needs two W-bit adders, one assuming a
// carry-in of 0 and one assuming 1. This group has a single W-bit ripple adder
// and uses time instead: the clock itself is the adder's carry input.
//   * clock high: the adder computes a + b + 1. The carry-in-1 latches (W sum
//     bits and the carry) are enabled by clk and follow it.
//   * clock low: the adder computes a + b + 0. The carry-in-1 latches hold;
//     the W carry-in-0 sum latches are enabled by the inverted clock and
//     follow the adder. The carry for carry-in 0 is taken straight from the
//     adder, which is producing it during this phase.
// A (W+1)-bit 2:1 mux then picks {carry, sum} of the carry-in-1 or carry-in-0
// result by sel, the carry arriving from the group below. That makes 2W+1
// latch bits per group (five for the 2-bit group), as in the description.
//
// Timing: a and b must be stable from a rising clock edge to the next one.
// During the low half of that cycle {cout, sum} equals a + b + sel and may be
// sampled at the following rising edge. During the high half the carry-in-0
// outputs still belong to the previous operands, so the outputs are only valid
// in the low half.
//
// The latches are intended, and the clock entering the adder as data is the
// essence of the scheme.
// Interface: clk, a, b (W bits), sel in; sum (W bits), cout out.
module dl_group #(
  parameter int unsigned W = 2
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sel,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic         clk_n;
  logic [W-1:0] s_add;   // adder sum in the current clock phase
  logic         c_add;   // adder carry in the current clock phase
  logic [W-1:0] s_one;   // latched sum for carry-in 1
  logic         c_one;   // latched carry for carry-in 1
  logic [W-1:0] s_zero;  // latched sum for carry-in 0

  assign clk_n = ~clk;

  rca #(.W(W)) u_rca (
    .a   (a),
    .b   (b),
    .cin (clk),
    .sum (s_add),
    .cout(c_add)
  );

  d_latch #(.W(W)) u_lat_s_one (
    .en(clk),
    .d (s_add),
    .q (s_one)
  );

  d_latch #(.W(1)) u_lat_c_one (
    .en(clk),
    .d (c_add),
    .q (c_one)
  );

  d_latch #(.W(W)) u_lat_s_zero (
    .en(clk_n),
    .d (s_add),
    .q (s_zero)
  );

  mux2 #(.W(W + 1)) u_mux (
    .sel(sel),
    .d0 ({c_add, s_zero}),
    .d1 ({c_one, s_one}),
    .y  ({cout, sum})
  );

endmodule
