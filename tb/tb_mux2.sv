// tb_mux2: checks the 3-bit (6:3) multiplexer for every select value and
// every pair of data words.
module tb_mux2;

  logic       sel;
  logic [2:0] d0, d1, y;
  int         checks = 0;
  int         failures = 0;

  mux2 dut (.sel, .d0, .d1, .y);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      {sel, d1, d0} = 7'(v);
      #1;
      checks++;
      if (y != (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0d d0=%0d d1=%0d y=%0d", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
