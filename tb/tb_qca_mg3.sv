// Self-checking testbench for qca_mg3: applies all eight input patterns and
// compares y with "two or more inputs are 1".
module tb_qca_mg3;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  qca_mg3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (y !== ($countones(3'(v)) >= 2)) begin
        failures++;
        $display("mismatch a=%0b b=%0b c=%0b y=%0b", a, b, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
