// TAPS-tap direct-form FIR filter whose additions are done by the
// five-input-majority-gate ripple adder (qca_adder):
//   y[n] = C[0]*x[n] + C[1]*x[n-1] + ... + C[TAPS-1]*x[n-TAPS+1]
// All arithmetic is WIDTH-bit two's complement and wraps modulo 2^WIDTH.
// The coefficients are constant parameters, so each product is a constant
// multiplication; the TAPS products are summed by a chain of TAPS-1
// qca_adder instances (carry in 0, carry out dropped).
//
// Interface and timing: a sample is taken on a rising clk edge when
// in_valid is 1. On that same edge the delay line shifts and y_out is
// loaded with the filter output for that sample, so out_valid rises one
// cycle after the sample and stays 1 for one cycle. Without in_valid the
// delay line and y_out hold. rst_n (active low, synchronous) clears the
// delay line, y_out and out_valid.
//
// The tap count (4) and the use of the majority-gate adder are the
// design's; the coefficient values, the register placement and the
// valid handshake are this implementation's choices.
module qca_fir #(
  parameter int unsigned WIDTH      = qca_pkg::ADDER_W,
  parameter int unsigned TAPS       = qca_pkg::FIR_TAPS,
  parameter int          COEF [TAPS] = qca_pkg::FIR_COEF_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] x_in,
  output logic             out_valid,
  output logic [WIDTH-1:0] y_out
);

  // Sign-extend a coefficient to WIDTH bits and multiply, modulo 2^WIDTH.
  function automatic logic [WIDTH-1:0] cmul(input logic [WIDTH-1:0] x, input int c);
    logic [WIDTH-1:0] cw;
    cw = WIDTH'(c);
    return x * cw;
  endfunction

  if (TAPS < 2) begin : g_bad_taps
    $error("qca_fir needs TAPS >= 2");
  end

  logic [WIDTH-1:0] dly  [TAPS-1];   // dly[k] holds x[n-1-k]
  logic [WIDTH-1:0] prod [TAPS];
  logic [WIDTH-1:0] acc  [TAPS];

  always_comb begin
    prod[0] = cmul(x_in, COEF[0]);
    for (int k = 1; k < TAPS; k++) prod[k] = cmul(dly[k-1], COEF[k]);
  end

  assign acc[0] = prod[0];

  for (genvar k = 1; k < TAPS; k++) begin : g_sum
    logic unused_cout;
    qca_adder #(.WIDTH(WIDTH)) u_add (
      .a   (acc[k-1]),
      .b   (prod[k]),
      .cin (1'b0),
      .sum (acc[k]),
      .cout(unused_cout)
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS-1; k++) dly[k] <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dly[0] <= x_in;
        for (int k = 1; k < TAPS-1; k++) dly[k] <= dly[k-1];
        y_out <= acc[TAPS-1];
      end
    end
  end

endmodule
