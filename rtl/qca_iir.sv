// Second-order direct-form-I IIR filter whose additions are done by the
// five-input-majority-gate ripple adder (qca_adder):
//   y[n] = B[0]*x[n] + B[1]*x[n-1] + A[0]*y[n-1] + A[1]*y[n-2]
// The signs of the feedback coefficients are folded into A, so the filter
// uses only additions. All arithmetic is WIDTH-bit two's complement and
// wraps modulo 2^WIDTH. The four products (constant multiplications) are
// summed by a chain of three qca_adder instances (carry in 0, carry out
// dropped).
//
// Interface and timing: a sample is taken on a rising clk edge when
// in_valid is 1. On that edge the input and output histories shift and
// y_out is loaded with y[n]; out_valid rises one cycle after the sample
// and stays 1 for one cycle. Without in_valid all state holds. rst_n
// (active low, synchronous) clears the histories, y_out and out_valid.
//
// That the design has an IIR filter built on the majority-gate adder is
// the design's; its order, its four coefficients and their values, the
// register placement and the valid handshake are this implementation's
// choices.
module qca_iir #(
  parameter int unsigned WIDTH         = qca_pkg::ADDER_W,
  parameter int          B [qca_pkg::IIR_FF] = qca_pkg::IIR_B_DEFAULT,
  parameter int          A [qca_pkg::IIR_FB] = qca_pkg::IIR_A_DEFAULT
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

  logic [WIDTH-1:0] x1;        // x[n-1]
  logic [WIDTH-1:0] y2;        // y[n-2]; y[n-1] is y_out
  logic [WIDTH-1:0] p [4];
  logic [WIDTH-1:0] s [4];
  logic [2:0]       unused_cout;

  always_comb begin
    p[0] = cmul(x_in,  B[0]);
    p[1] = cmul(x1,    B[1]);
    p[2] = cmul(y_out, A[0]);
    p[3] = cmul(y2,    A[1]);
  end

  assign s[0] = p[0];

  for (genvar k = 1; k < 4; k++) begin : g_sum
    qca_adder #(.WIDTH(WIDTH)) u_add (
      .a   (s[k-1]),
      .b   (p[k]),
      .cin (1'b0),
      .sum (s[k]),
      .cout(unused_cout[k-1])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1        <= '0;
      y2        <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x1    <= x_in;
        y2    <= y_out;
        y_out <= s[3];
      end
    end
  end

endmodule
