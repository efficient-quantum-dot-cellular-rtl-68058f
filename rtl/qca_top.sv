// Top level: the WIDTH-bit five-input-majority-gate ripple adder on its
// own, and the FIR and IIR filters that use it, side by side.
//
//   add_*  combinational adder: {add_cout, add_sum} = add_a + add_b + add_cin
//   fir_*  4-tap FIR filter, one sample per cycle at most, one cycle latency
//   iir_*  second-order IIR filter, same handshake and latency
//
// clk and rst_n (active low, synchronous) are shared by the two filters.
// Bringing the three out as independent ports is this implementation's
// choice; the design evaluates the adder alone and inside each filter.
module qca_top #(
  parameter int unsigned WIDTH = qca_pkg::ADDER_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // stand-alone adder
  input  logic [WIDTH-1:0] add_a,
  input  logic [WIDTH-1:0] add_b,
  input  logic             add_cin,
  output logic [WIDTH-1:0] add_sum,
  output logic             add_cout,
  // FIR filter
  input  logic             fir_in_valid,
  input  logic [WIDTH-1:0] fir_x,
  output logic             fir_out_valid,
  output logic [WIDTH-1:0] fir_y,
  // IIR filter
  input  logic             iir_in_valid,
  input  logic [WIDTH-1:0] iir_x,
  output logic             iir_out_valid,
  output logic [WIDTH-1:0] iir_y
);

  qca_adder #(.WIDTH(WIDTH)) u_adder (
    .a   (add_a),
    .b   (add_b),
    .cin (add_cin),
    .sum (add_sum),
    .cout(add_cout)
  );

  qca_fir #(.WIDTH(WIDTH)) u_fir (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (fir_in_valid),
    .x_in     (fir_x),
    .out_valid(fir_out_valid),
    .y_out    (fir_y)
  );

  qca_iir #(.WIDTH(WIDTH)) u_iir (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (iir_in_valid),
    .x_in     (iir_x),
    .out_valid(iir_out_valid),
    .y_out    (iir_y)
  );

endmodule
