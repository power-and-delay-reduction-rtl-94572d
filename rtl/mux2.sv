// mux2: W-bit 2:1 multiplexer, one 2:1 mux per bit.
//
// y = sel ? d1 : d0. The 6:3 mux of a 2-bit adder group (two sum bits and a
// carry, for carry-in 0 and carry-in 1) is the W = 3 instance.
// Building the 6:3 mux from 2:1 muxes follows the original description.
// Interface: sel, d0, d1 in; y out. Combinational.
module mux2 #(
  parameter int unsigned W = 3
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);

  always_comb begin
    for (int unsigned i = 0; i < W; i++) y[i] = sel ? d1[i] : d0[i];
  end

endmodule
