// One-bit full adder from two majority gates and one inverter.
//   cout = MG3(a, b, cin)
//   sum  = MG5(a, b, cin, ~cout, ~cout)
// The inverted carry is fed to two inputs of the five-input gate, so it
// carries weight two: with k = a + b + cin ones, the five-input gate sees
// k + 2 ones for k <= 1 and k for k >= 2, which is a majority exactly when k
// is odd. The gate count (one MG3, one MG5, one inverter) is the design's;
// the input wiring of the five-input gate is the standard arrangement for
// that gate count. Purely combinational.
module qca_fa5 (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic cout_n;

  qca_mg3 u_carry (.a(a), .b(b), .c(cin), .y(cout));

  always_comb cout_n = ~cout;

  qca_mg5 u_sum (.a(a), .b(b), .c(cin), .d(cout_n), .e(cout_n), .y(sum));

endmodule
