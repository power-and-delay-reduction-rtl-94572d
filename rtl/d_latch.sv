// d_latch: W-bit level-sensitive D latch.
//
// While en is 1 the latch is transparent (q follows d); while en is 0 it holds
// the value present when en fell. No reset: in the adder every latch is written
// in each clock phase, so its content is always defined before it is selected.
// The latch this module infers is intended; it is the storage element of the
// adder.
// Active-high enable is as described; the width parameter is a convenience.
// Interface: en, d (W bits) in; q (W bits) out.
module d_latch #(
  parameter int unsigned W = 1
) (
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_latch begin
    if (en) q = d;
  end

endmodule
