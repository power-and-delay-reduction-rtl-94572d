// tb_d_latch: checks that a 4-bit latch is transparent while enabled (q
// follows every change of d at once) and holds its last value while disabled,
// however d changes.
module tb_d_latch;

  logic       en;
  logic [3:0] d, q, held;
  int         checks = 0;
  int         failures = 0;

  d_latch #(.W(4)) dut (.en, .d, .q);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1;
    d  = 4'h0;
    #1;
    for (int round = 0; round < 50; round++) begin
      // transparent phase: several changes of d, each visible at once
      en = 1'b1;
      for (int k = 0; k < 4; k++) begin
        d = 4'($urandom);
        #1;
        checks++;
        if (q != d) begin
          failures++;
          $display("FAIL transparent d=%h q=%h", d, q);
        end
      end
      held = d;
      // opaque phase: d changes must not reach q
      en = 1'b0;
      #1;
      for (int k = 0; k < 4; k++) begin
        d = ~held ^ 4'(k);
        #1;
        checks++;
        if (q != held) begin
          failures++;
          $display("FAIL hold expected %h q=%h d=%h", held, q, d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
