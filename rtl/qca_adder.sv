// WIDTH-bit ripple-carry adder made of five-input-majority-gate full adders
// (qca_fa5). Bit i takes the carry out of bit i-1; the carry in of bit 0 is
// the cin port and the carry out of the top bit is cout, so
// {cout, sum} = a + b + cin. Purely combinational: the carry path crosses
// one three-input majority gate per bit. The default width, 128 bits, is
// the design's.
module qca_adder #(
  parameter int unsigned WIDTH = qca_pkg::ADDER_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    qca_fa5 u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
