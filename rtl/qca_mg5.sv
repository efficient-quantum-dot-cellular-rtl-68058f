// Five-input majority gate: y is 1 when three or more of the five inputs are
// 1. Written as the sum of the ten three-input product terms, as the
// source design defines it. Purely combinational; the QCA cell layout is
// not modelled.
module qca_mg5 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic y
);

  always_comb
    y = (a & b & c) | (a & b & d) | (a & b & e) | (a & c & d) | (a & c & e)
      | (a & d & e) | (b & c & d) | (b & c & e) | (b & d & e) | (c & d & e);

endmodule
