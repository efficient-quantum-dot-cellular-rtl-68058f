// Self-checking testbench for qca_iir with its default width (128 bits) and
// coefficients b0 = 2, b1 = 1, a1 = 1, a2 = -1. The reference model keeps
// its own histories and computes y[n] = 2x[n] + x[n-1] + y[n-1] - y[n-2]
// modulo 2^128. Random samples are offered with random idle cycles, and a
// stretch of zero input samples checks that the output keeps evolving from
// feedback alone. Each cycle checks out_valid and y_out; a synchronous
// reset in mid-run must clear all state.
module tb_qca_iir;
  localparam int unsigned W = 128;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid;
  logic [W-1:0] x_in;
  logic         out_valid;
  logic [W-1:0] y_out;

  int checks = 0, failures = 0;
  int idle_cycles = 0, samples = 0, resets = 0, feedback_only = 0;

  logic [W-1:0] xm1, ym1, ym2;
  logic [W-1:0] exp_y;
  logic         exp_valid;

  qca_iir dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .out_valid(out_valid), .y_out(y_out)
  );

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_reset();
    xm1 = '0; ym1 = '0; ym2 = '0;
    exp_y = '0;
    exp_valid = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0;
    model_reset();
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      if (n == 1500) begin
        rst_n = 1'b0; in_valid = 1'b1; x_in = rnd();
        model_reset();
        resets++;
      end else begin
        rst_n = 1'b1;
        in_valid = ($urandom_range(0, 3) != 0);
        if (n < 20)                 x_in = W'(n + 1);
        else if (n >= 100 && n < 140) x_in = '0;   // feedback only
        else                        x_in = rnd();
        if (in_valid) begin
          exp_y = 2 * x_in + xm1 + ym1 - ym2;
          if (x_in == '0 && xm1 == '0 && exp_y != '0) feedback_only++;
          xm1 = x_in;
          ym2 = ym1;
          ym1 = exp_y;
          samples++;
        end else begin
          idle_cycles++;
        end
        exp_valid = in_valid;
      end
      @(negedge clk);
      checks++;
      if (out_valid !== exp_valid || y_out !== exp_y) begin
        failures++;
        $display("cycle %0d: got valid=%0b y=%h exp valid=%0b y=%h",
                 n, out_valid, y_out, exp_valid, exp_y);
      end
    end
    if (idle_cycles == 0 || samples == 0 || resets == 0 || feedback_only == 0) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
