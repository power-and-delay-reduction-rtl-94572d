// rca: W-bit ripple carry adder.
//
// A chain of W full adders; the carry of bit i feeds bit i+1. It serves as the
// 2-bit adder of the least significant group and as the single adder inside
// each D-latch group, where its carry input is the clock.
// A plain full-adder chain, as described for the least significant group.
// Interface: a, b (W bits) and cin in; sum (W bits) and cout out.
// Combinational; delay grows linearly with W.
module rca #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];

endmodule
