// End-to-end testbench for qca_top at its default parameters (128-bit
// datapath). Each clock cycle it offers the stand-alone adder a new operand
// pair and, independently, offers the FIR and IIR filters a sample or an
// idle cycle. Reference models in the testbench compute
//   adder: {cout, sum} = a + b + cin                      (129-bit sum)
//   FIR:   y[n] = x[n] + 3x[n-1] + 3x[n-2] + x[n-3]       (mod 2^128)
//   IIR:   y[n] = 2x[n] + x[n-1] + y[n-1] - y[n-2]        (mod 2^128)
// and every cycle's outputs are compared with them. It also counts how
// often each mechanism occurred and fails if one never did: an adder carry
// out, a carry rippling through all 128 bits, FIR and IIR idle (hold)
// cycles, FIR results that wrapped past 2^128, IIR output driven by
// feedback alone, and a mid-run synchronous reset.
module tb_qca_top;
  localparam int unsigned W = 128;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] add_a, add_b, add_sum;
  logic         add_cin, add_cout;
  logic         fir_in_valid, fir_out_valid;
  logic [W-1:0] fir_x, fir_y;
  logic         iir_in_valid, iir_out_valid;
  logic [W-1:0] iir_x, iir_y;

  int checks = 0, failures = 0;
  int n_carry = 0, n_full_ripple = 0, n_fir_idle = 0, n_iir_idle = 0;
  int n_fir_wrap = 0, n_iir_feedback = 0, n_reset = 0;

  logic [W-1:0] fh [4];
  logic [W-1:0] fir_exp;
  logic         fir_exp_valid;
  logic [W-1:0] xm1, ym1, ym2, iir_exp;
  logic         iir_exp_valid;

  qca_top dut (
    .clk(clk), .rst_n(rst_n),
    .add_a(add_a), .add_b(add_b), .add_cin(add_cin),
    .add_sum(add_sum), .add_cout(add_cout),
    .fir_in_valid(fir_in_valid), .fir_x(fir_x),
    .fir_out_valid(fir_out_valid), .fir_y(fir_y),
    .iir_in_valid(iir_in_valid), .iir_x(iir_x),
    .iir_out_valid(iir_out_valid), .iir_y(iir_y)
  );

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  task automatic models_reset();
    for (int k = 0; k < 4; k++) fh[k] = '0;
    fir_exp = '0; fir_exp_valid = 1'b0;
    xm1 = '0; ym1 = '0; ym2 = '0;
    iir_exp = '0; iir_exp_valid = 1'b0;
  endtask

  task automatic check_adder();
    logic [W:0] exp;
    exp = {1'b0, add_a} + {1'b0, add_b} + {{W{1'b0}}, add_cin};
    checks++;
    if (add_cout) n_carry++;
    if (add_a == '1 && add_cin && add_b == '0) n_full_ripple++;
    if ({add_cout, add_sum} !== exp) begin
      failures++;
      $display("adder: a=%h b=%h cin=%0b got %0b_%h exp %h",
               add_a, add_b, add_cin, add_cout, add_sum, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W+2:0] wide;
    rst_n = 1'b0;
    fir_in_valid = 1'b0; fir_x = '0;
    iir_in_valid = 1'b0; iir_x = '0;
    add_a = '0; add_b = '0; add_cin = 1'b0;
    models_reset();
    @(negedge clk);
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      // stand-alone adder
      if (n % 97 == 3) begin
        add_a = '1; add_b = '0; add_cin = 1'b1;
      end else begin
        add_a = rnd(); add_b = rnd(); add_cin = 1'($urandom);
      end
      // filters
      if (n == 2000) begin
        rst_n = 1'b0;
        fir_in_valid = 1'b1; fir_x = rnd();
        iir_in_valid = 1'b1; iir_x = rnd();
        models_reset();
        n_reset++;
      end else begin
        rst_n = 1'b1;
        fir_in_valid = ($urandom_range(0, 4) != 0);
        fir_x = rnd();
        iir_in_valid = ($urandom_range(0, 4) != 0);
        iir_x = (n >= 2100 && n < 2200) ? '0 : ((n < 30) ? W'(n) : rnd());
        if (fir_in_valid) begin
          for (int k = 3; k > 0; k--) fh[k] = fh[k-1];
          fh[0] = fir_x;
          wide = (W+3)'(fh[0]) + 3 * (W+3)'(fh[1]) + 3 * (W+3)'(fh[2]) + (W+3)'(fh[3]);
          if (wide[W+2:W] != '0) n_fir_wrap++;
          fir_exp = wide[W-1:0];
        end else begin
          n_fir_idle++;
        end
        fir_exp_valid = fir_in_valid;
        if (iir_in_valid) begin
          iir_exp = 2 * iir_x + xm1 + ym1 - ym2;
          if (iir_x == '0 && xm1 == '0 && iir_exp != '0) n_iir_feedback++;
          xm1 = iir_x; ym2 = ym1; ym1 = iir_exp;
        end else begin
          n_iir_idle++;
        end
        iir_exp_valid = iir_in_valid;
      end
      #1;
      check_adder();
      @(negedge clk);
      checks++;
      if (fir_out_valid !== fir_exp_valid || fir_y !== fir_exp) begin
        failures++;
        $display("fir cycle %0d: got %0b %h exp %0b %h", n, fir_out_valid, fir_y,
                 fir_exp_valid, fir_exp);
      end
      checks++;
      if (iir_out_valid !== iir_exp_valid || iir_y !== iir_exp) begin
        failures++;
        $display("iir cycle %0d: got %0b %h exp %0b %h", n, iir_out_valid, iir_y,
                 iir_exp_valid, iir_exp);
      end
    end
    $display("carry_out=%0d full_ripple=%0d fir_idle=%0d iir_idle=%0d fir_wrap=%0d iir_feedback=%0d reset=%0d",
             n_carry, n_full_ripple, n_fir_idle, n_iir_idle, n_fir_wrap, n_iir_feedback, n_reset);
    if (n_carry == 0 || n_full_ripple == 0 || n_fir_idle == 0 || n_iir_idle == 0 ||
        n_fir_wrap == 0 || n_iir_feedback == 0 || n_reset == 0) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
