// tb_dl_csla16: end-to-end test of the 16-bit D-latch carry select adder at
// its default configuration.
//
// Operands and carry-in are applied at each rising clock edge and the sum is
// checked against a + b + cin one time unit before the next rising edge, i.e.
// one addition per clock cycle. Directed cases (zero, all ones, carries that
// ripple through every group) come first, then random operands.
//
// Coverage counted and required: for every upper group, both values of its
// select carry (carry-in-1 latch path and carry-in-0 path), and both values of
// cin and cout. The select carries are computed from the operands here, not
// read from the design.
module tb_dl_csla16;
  import csla_pkg::*;

  localparam int unsigned HALF   = 5;
  localparam int unsigned NCYCLE = 20000;

  logic             clk;
  logic [WIDTH-1:0] a, b, sum;
  logic             cin, cout;
  int               checks = 0;
  int               failures = 0;
  int               sel_seen [NUM_GROUPS][2];
  int               cin_seen [2];
  int               cout_seen [2];

  dl_csla16 dut (.clk, .a, .b, .cin, .sum, .cout);

  initial begin
    #(2 * HALF * (NCYCLE + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Carry into bit 'pos' of a + b + ci.
  function automatic logic carry_into(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y,
                                      logic ci, int unsigned pos);
    logic [WIDTH:0] lo;
    logic [WIDTH:0] mask;
    mask = (17'(1) << pos) - 17'(1);
    lo   = ({1'b0, x} & mask) + ({1'b0, y} & mask) + 17'(ci);
    return lo[pos];
  endfunction

  task automatic one_add(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y, logic ci);
    logic [WIDTH:0] expect_v;
    clk = 1'b1;
    a   = x;
    b   = y;
    cin = ci;
    #HALF;
    clk = 1'b0;
    #(HALF - 1);
    expect_v = {1'b0, x} + {1'b0, y} + 17'(ci);
    checks++;
    if ({cout, sum} != expect_v) begin
      failures++;
      $display("FAIL %h + %h + %0d -> %h (expected %h)", x, y, ci, {cout, sum}, expect_v);
    end
    for (int unsigned g = 1; g < NUM_GROUPS; g++)
      sel_seen[g][carry_into(x, y, ci, group_lsb(g))]++;
    cin_seen[ci]++;
    cout_seen[expect_v[WIDTH]]++;
    #1;
  endtask

  initial begin
    foreach (sel_seen[g, v]) sel_seen[g][v] = 0;
    cin_seen  = '{0, 0};
    cout_seen = '{0, 0};
    clk = 1'b0;
    a   = '0;
    b   = '0;
    cin = 1'b0;
    #HALF;
    // directed cases
    one_add(16'h0000, 16'h0000, 1'b0);
    one_add(16'h0000, 16'h0000, 1'b1);
    one_add(16'hFFFF, 16'h0000, 1'b1);  // carry ripples through every group
    one_add(16'hFFFF, 16'hFFFF, 1'b1);
    one_add(16'hFFFF, 16'hFFFF, 1'b0);
    one_add(16'h7FFF, 16'h0001, 1'b0);
    one_add(16'h8000, 16'h8000, 1'b0);
    one_add(16'h0003, 16'h0001, 1'b0);  // carry out of group 1 only
    one_add(16'h000F, 16'h0001, 1'b0);
    // the same operands twice in a row, then a change only in the low group
    one_add(16'h1234, 16'h4321, 1'b0);
    one_add(16'h1234, 16'h4321, 1'b0);
    one_add(16'h1234, 16'h4323, 1'b1);
    for (int unsigned i = 0; i < NCYCLE; i++)
      one_add(16'($urandom), 16'($urandom), 1'($urandom));

    for (int unsigned g = 1; g < NUM_GROUPS; g++) begin
      $display("group %0d select: carry-in-0 path %0d, carry-in-1 path %0d",
               g + 1, sel_seen[g][0], sel_seen[g][1]);
      for (int v = 0; v < 2; v++) begin
        checks++;
        if (sel_seen[g][v] == 0) begin
          failures++;
          $display("FAIL group %0d never selected with carry %0d", g + 1, v);
        end
      end
    end
    $display("cin 0/1: %0d/%0d  cout 0/1: %0d/%0d",
             cin_seen[0], cin_seen[1], cout_seen[0], cout_seen[1]);
    for (int v = 0; v < 2; v++) begin
      checks += 2;
      if (cin_seen[v] == 0) failures++;
      if (cout_seen[v] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
