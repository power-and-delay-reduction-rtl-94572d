// dl_csla16: 16-bit square-root carry select adder with D-latch groups.
//
// The adder is cut into five groups (widths in csla_pkg::GROUP_W, 2/2/3/4/5
// bits from the least significant end). Group 1 is a plain 2-bit ripple carry
// adder fed by cin. Each of groups 2 to 5 is a dl_group: one ripple adder whose
// carry input is the clock, so it produces the carry-in-1 result while the
// clock is high and the carry-in-0 result while it is low, each kept in
// D-latches. The carry out of group 1 selects the result of group 2, the
// selected carry of group 2 selects that of group 3, and so on; the selected
// carry of group 5 is cout. The select chain is therefore one mux per group
// rather than a ripple through all 16 bits.
//
// Timing: apply a, b and cin at a rising clock edge and hold them for the whole
// cycle. Both group results are complete by the end of that cycle; sum and cout
// are valid during its low half and can be sampled at the next rising edge, so
// one addition is completed per clock cycle. In the high half the outputs of
// the upper groups are not valid.
//
// Intended latches: 32 latch bits (2W+1 per upper group). The clock is used as
// data (the carry input of the group adders); this is the scheme itself.
// The group structure, the clock as carry input and the latch count follow
// the original description; the cin port, the 3/4/5 widths of the top three
// groups and the group-to-group select chain are this design's choices.
// Interface: clk, a[15:0], b[15:0], cin in; sum[15:0], cout out.
module dl_csla16
  import csla_pkg::*;
(
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // The group widths must tile the word exactly.
  if (group_lsb(NUM_GROUPS) != WIDTH) begin : g_width_check
    $error("csla_pkg::GROUP_W does not add up to WIDTH");
  end

  // c[g] is the carry out of group g (0-based); c[0] comes from the ripple
  // adder of group 1 and selects group 2.
  logic [NUM_GROUPS-1:0] c;

  rca #(.W(GROUP_W[0])) u_g1 (
    .a   (a[GROUP_W[0]-1:0]),
    .b   (b[GROUP_W[0]-1:0]),
    .cin (cin),
    .sum (sum[GROUP_W[0]-1:0]),
    .cout(c[0])
  );

  for (genvar g = 1; g < NUM_GROUPS; g++) begin : g_grp
    localparam int unsigned LSB = group_lsb(g);
    localparam int unsigned GW  = GROUP_W[g];

    dl_group #(.W(GW)) u_grp (
      .clk (clk),
      .a   (a[LSB+GW-1:LSB]),
      .b   (b[LSB+GW-1:LSB]),
      .sel (c[g-1]),
      .sum (sum[LSB+GW-1:LSB]),
      .cout(c[g])
    );
  end

  assign cout = c[NUM_GROUPS-1];

endmodule
