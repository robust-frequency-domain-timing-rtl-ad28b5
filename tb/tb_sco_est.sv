// Test of the coarse SCO estimator. Group angles of two STF symbols are
// synthesised for a sampling delay tau_a and tau_b = tau_a + delta * d plus a
// common phase change (CFO) and an arbitrary channel phase per group that is
// the same in both symbols, all wrapped into -pi..pi. The estimate must be
// d (samples per symbol) * 8192 * 2^FR within 1 %, for several delays, drifts
// of both signs and symbol intervals. Latency start -> done is checked too.
// The angle-difference model follows the document; the test cases and
// tolerance are this testbench's.
module tb_sco_est;
  import fd_sync_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  ang_t ang_a [N_GRP], ang_b [N_GRP];
  logic [3:0] delta = 4'd2;
  logic signed [31:0] sco;
  int checks = 0, failures = 0;

  sco_est dut (.*);
  always #5 clk = ~clk;

  function automatic ang_t wrap(input real c);
    while (c >= PI_Q) c -= 2 * PI_Q;
    while (c < -PI_Q) c += 2 * PI_Q;
    return ang_t'($rtoi(c + ((c >= 0) ? 0.5 : -0.5)));
  endfunction

  task automatic run(input real tau_a, input real d, input int dl, input real cfo_cnt);
    real exp_s, ch [N_GRP];
    int lat;
    for (int g = 0; g < N_GRP; g++) begin
      real kc;
      kc = 8.0 * grp_x(g);
      ch[g] = $urandom_range(2 * PI_Q);
      ang_a[g] = wrap(-2.0 * PI_Q * kc * tau_a / N_FFT + ch[g]);
      ang_b[g] = wrap(-2.0 * PI_Q * kc * (tau_a + dl * d) / N_FFT + ch[g] + cfo_cnt);
    end
    delta <= 4'(dl);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!done && lat < 500);
    exp_s = d * 2.0 * PI_Q * (1 << FR);
    checks++;
    if (real'(sco) > exp_s + 0.01 * (exp_s < 0 ? -exp_s : exp_s) + 16 ||
        real'(sco) < exp_s - 0.01 * (exp_s < 0 ? -exp_s : exp_s) - 16) begin
      failures++;
      $display("FAIL: tau %f d %f delta %0d: sco %0d expected %f", tau_a, d, dl, sco, exp_s);
    end
    checks++;
    if (lat != 67) begin failures++; $display("FAIL: latency %0d", lat); end
  endtask

  initial begin
    for (int g = 0; g < N_GRP; g++) begin ang_a[g] = '0; ang_b[g] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(0.1, 0.0256, 2, 300.0);
    run(-0.3, -0.0384, 2, -900.0);
    run(0.45, 0.01, 1, 0.0);
    run(0.0, 0.2, 2, 100.0);       // includes a half-sample step
    run(-0.2, -0.05, 3, 2000.0);
    run(0.3, 0.0005, 4, -3000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
