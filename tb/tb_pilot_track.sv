// Test of pilot tracking. Pilot tones 27, 54, 78 and 105 are synthesised for a
// sampling delay tau: R_k = X_k * (2 p_n - 1) * A * exp(-j 2 pi ks tau / 128)
// times a common phase that changes from symbol to symbol (ks the signed
// frequency, p_n from an independent x^15 + x^14 + 1 generator). Blocks of 8
// symbols with one tau each; after each block the average must be
// -2 * PI_Q * 27 * tau / 128 counts (+-3), and the step -1, 0 or +1 as the
// average lies above DZ, within, or below -DZ. step_valid must come once per
// 8 symbols, the clock after the 8th.
// Pilot tones, values, polarity generator and the 8-symbol average follow
// the document; the test delays are this testbench's.
module tb_pilot_track;
  import fd_sync_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, sym_valid = 1'b0;
  cplx_t pilot [4];
  logic step_valid;
  logic signed [1:0] step;
  logic signed [AW+1:0] avg;
  int checks = 0, failures = 0, n_steps = 0;
  bit [15:1] pn;

  pilot_track dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && step_valid) n_steps++;

  task automatic block(input real tau);
    real e;
    int exp_step;
    for (int s = 0; s < 8; s++) begin
      int pol, ks [4], xi [4];
      bit p;
      real cph;
      p = pn[14] ^ pn[15];
      pn = {pn[14:1], p};
      pol = p ? 1 : -1;
      ks = '{27, 54, -50, -23};
      xi = '{1, -1, -1, 1};
      cph = $urandom_range(6283) / 1000.0;
      for (int q = 0; q < 4; q++) begin
        real a, xr, xim;
        a   = -2.0 * PI * ks[q] * tau / N_FFT + cph;
        xr  = 500.0 * pol;
        xim = 500.0 * pol * xi[q];
        pilot[q] <= '{re: SW'($rtoi(xr * $cos(a) - xim * $sin(a))),
                      im: SW'($rtoi(xr * $sin(a) + xim * $cos(a)))};
      end
      sym_valid <= 1'b1;
      @(posedge clk);
      sym_valid <= 1'b0;
      if (s < 7) begin
        @(posedge clk);
        checks++;
        if (step_valid) begin failures++; $display("FAIL: step before the 8th symbol"); end
      end
    end
    #1;
    checks++;
    if (!step_valid) begin failures++; $display("FAIL: no step_valid after 8 symbols"); end
    e = -2.0 * PI_Q * 27.0 * tau / N_FFT;
    exp_step = (e > 108.0) ? -1 : (e < -108.0) ? 1 : 0;
    checks++;
    if (real'(avg) > e + 3.0 || real'(avg) < e - 3.0 || int'(step) != exp_step) begin
      failures++;
      $display("FAIL: tau %f avg %0d (expected %f) step %0d (expected %0d)", tau, avg, e, step, exp_step);
    end
    @(posedge clk);
  endtask

  initial begin
    for (int q = 0; q < 4; q++) pilot[q] = '0;
    pn = 15'b110_1000_0010_1000;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    clear <= 1'b1; @(posedge clk); clear <= 1'b0;
    block(0.1);
    block(-0.1);
    block(0.03);
    block(-0.05);
    block(0.3);
    block(-0.2);
    block(0.07);
    repeat (2) @(posedge clk);
    checks++;
    if (n_steps != 7) begin failures++; $display("FAIL: %0d step outputs", n_steps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
