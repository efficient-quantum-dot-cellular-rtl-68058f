// Self-checking testbench for qca_fir with its default width (128 bits),
// four taps and coefficients 1, 3, 3, 1. Random samples are offered with
// random idle cycles in between. The reference model keeps its own sample
// history and computes y[n] = x[n] + 3x[n-1] + 3x[n-2] + x[n-3] modulo
// 2^128. Each cycle checks out_valid (one cycle after each accepted
// sample, never otherwise) and y_out (new value after a sample, held
// otherwise). A synchronous reset in mid-run must clear the history.
module tb_qca_fir;
  localparam int unsigned W = 128;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid;
  logic [W-1:0] x_in;
  logic         out_valid;
  logic [W-1:0] y_out;

  int checks = 0, failures = 0;
  int idle_cycles = 0, samples = 0, resets = 0;

  logic [W-1:0] hist [4];
  logic [W-1:0] exp_y;
  logic         exp_valid;

  qca_fir dut (
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
    for (int k = 0; k < 4; k++) hist[k] = '0;
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
      // drive this cycle's input and work out what the next edge produces
      if (n == 1500) begin
        rst_n = 1'b0; in_valid = 1'b1; x_in = rnd();
        model_reset();
        resets++;
      end else begin
        rst_n = 1'b1;
        in_valid = ($urandom_range(0, 3) != 0);
        x_in = (n < 20) ? W'(n + 1) : rnd();
        if (in_valid) begin
          for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
          hist[0] = x_in;
          exp_y = hist[0] + 3 * hist[1] + 3 * hist[2] + hist[3];
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
    if (idle_cycles == 0 || samples == 0 || resets == 0) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
