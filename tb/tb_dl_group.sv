// tb_dl_group: checks a D-latch adder group at its default width (2 bits) and
// at 5 bits.
//
// Each cycle the operands change at the rising clock edge. Near the end of the
// low half of that cycle both select values are applied in turn and the group
// output must equal a + b + sel. With sel = 1 the result comes from the latches
// written in the high half, while the adder is already computing the carry-in-0
// sum, so this also checks that those latches hold. The check time bounds the
// latency: one result per clock cycle.
module tb_dl_group;

  localparam int unsigned HALF = 5;

  logic       clk;
  logic       sel;
  logic [1:0] a2, b2, s2;
  logic       c2;
  logic [4:0] a5, b5, s5;
  logic       c5;
  int         checks = 0;
  int         failures = 0;

  dl_group dut2 (.clk, .a(a2), .b(b2), .sel, .sum(s2), .cout(c2));
  dl_group #(.W(5)) dut5 (.clk, .a(a5), .b(b5), .sel, .sum(s5), .cout(c5));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0;
    sel = 1'b0;
    a2  = '0;
    b2  = '0;
    a5  = '0;
    b5  = '0;
    #HALF;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      // rising edge: new operands, carry-in-1 addition in this half
      clk = 1'b1;
      if (cyc < 16) begin
        {a2, b2} = 4'(cyc);  // every 2-bit operand pair first
      end else begin
        {a2, b2} = 4'($urandom);
      end
      {a5, b5} = 10'($urandom);
      #HALF;
      // falling edge: carry-in-0 addition in this half
      clk = 1'b0;
      #(HALF - 2);
      for (int s = 0; s < 2; s++) begin
        sel = s[0];
        #1;
        checks += 2;
        if ({c2, s2} != 3'(int'(a2) + int'(b2) + s)) begin
          failures++;
          $display("FAIL W=2 cyc=%0d %0d+%0d+%0d -> %0d", cyc, a2, b2, s, {c2, s2});
        end
        if ({c5, s5} != 6'(int'(a5) + int'(b5) + s)) begin
          failures++;
          $display("FAIL W=5 cyc=%0d %0d+%0d+%0d -> %0d", cyc, a5, b5, s, {c5, s5});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
