// Self-checking testbench for qca_adder at its default width (128 bits).
// Drives corner cases (zero, all ones, a carry rippling through every bit)
// and random operands, and compares {cout, sum} with a (WIDTH+1)-bit sum
// computed by the testbench.
module tb_qca_adder;
  localparam int unsigned W = 128;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int carries = 0;

  qca_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    logic [W:0] exp;
    a = x; b = y; cin = ci;
    #1;
    exp = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, ci};
    checks++;
    if (cout) carries++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("mismatch a=%h b=%h cin=%0b got %0b_%h exp %h", x, y, ci, cout, sum, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0, 1'b0);
    check('0, '0, 1'b1);
    check('1, '0, 1'b1);          // carry ripples through every bit
    check('1, '1, 1'b1);
    check('1, W'(1), 1'b0);
    check({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}}, 1'b0);
    for (int i = 0; i < W; i++) check(W'(1) << i, W'(1) << i, 1'b0);
    for (int i = 0; i < 2000; i++) check(rnd(), rnd(), 1'($urandom));
    if (carries == 0) begin
      failures++;
      $display("no carry out was produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
