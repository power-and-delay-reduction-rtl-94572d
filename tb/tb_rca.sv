// tb_rca: exhaustive check of the ripple carry adder at its default width
// (2 bits) and at 5 bits, the widest group of the 16-bit adder.
module tb_rca;

  logic [1:0] a2, b2, s2;
  logic       c2i, c2o;
  logic [4:0] a5, b5, s5;
  logic       c5i, c5o;
  int         checks = 0;
  int         failures = 0;

  rca dut2 (.a(a2), .b(b2), .cin(c2i), .sum(s2), .cout(c2o));
  rca #(.W(5)) dut5 (.a(a5), .b(b5), .cin(c5i), .sum(s5), .cout(c5o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {a2, b2, c2i} = 5'(v);
      #1;
      checks++;
      if ({c2o, s2} != 3'(int'(a2) + int'(b2) + int'(c2i))) begin
        failures++;
        $display("FAIL W=2 %0d+%0d+%0d -> %0d", a2, b2, c2i, {c2o, s2});
      end
    end
    for (int v = 0; v < 2048; v++) begin
      {a5, b5, c5i} = 11'(v);
      #1;
      checks++;
      if ({c5o, s5} != 6'(int'(a5) + int'(b5) + int'(c5i))) begin
        failures++;
        $display("FAIL W=5 %0d+%0d+%0d -> %0d", a5, b5, c5i, {c5o, s5});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
