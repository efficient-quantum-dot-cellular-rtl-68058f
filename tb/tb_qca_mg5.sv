// Self-checking testbench for qca_mg5: applies all 32 input patterns and
// compares y with "three or more inputs are 1".
module tb_qca_mg5;
  logic a, b, c, d, e, y;
  int checks = 0, failures = 0;

  qca_mg5 dut (.a(a), .b(b), .c(c), .d(d), .e(e), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {a, b, c, d, e} = 5'(v);
      #1;
      checks++;
      if (y !== ($countones(5'(v)) >= 3)) begin
        failures++;
        $display("mismatch inputs=%05b y=%0b", 5'(v), y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
