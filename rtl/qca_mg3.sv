// Three-input majority gate, the basic logic primitive of quantum-dot
// cellular automata: y = AB + BC + AC. With one input tied to 0 it acts as
// an AND gate, with one input tied to 1 as an OR gate. Purely combinational.
// The equation is the source design's; the QCA cell layout is not modelled.
module qca_mg3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = (a & b) | (b & c) | (a & c);

endmodule
