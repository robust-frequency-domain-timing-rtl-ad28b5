// Test of the CFO estimator. Two STF symbols' group angles differ by a common
// rotation 2*pi*eps*delta_f (eps the CFO as a fraction of the carrier) plus a
// sampling-delay ramp, which must not disturb the mean. The output must be
// eps in 1/16 ppm within 0.5 ppm.
// The 60 GHz carrier and 2.64 GHz sample rate (delta_f = 5818) come from the
// document; the test offsets and tolerance are this testbench's.
module tb_cfo_est;
  import fd_sync_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  ang_t ang_a [N_GRP], ang_b [N_GRP];
  logic [15:0] delta_f = 16'd5818;
  logic signed [31:0] cfo;
  int checks = 0, failures = 0;

  cfo_est dut (.*);
  always #5 clk = ~clk;

  function automatic ang_t wrap(input real c);
    while (c >= PI_Q) c -= 2 * PI_Q;
    while (c < -PI_Q) c += 2 * PI_Q;
    return ang_t'($rtoi(c + ((c >= 0) ? 0.5 : -0.5)));
  endfunction

  task automatic run(input real ppm, input int df, input real dtau);
    real rot;
    int lat;
    rot = 2.0 * PI_Q * ppm * 1.0e-6 * df;      // counts
    for (int g = 0; g < N_GRP; g++) begin
      real kc, ch;
      kc = 8.0 * grp_x(g);
      ch = $urandom_range(2 * PI_Q);
      ang_a[g] = wrap(ch);
      ang_b[g] = wrap(ch + rot - 2.0 * PI_Q * kc * dtau / N_FFT);
    end
    delta_f <= 16'(df);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!done && lat < 500);
    checks++;
    if (real'(cfo) > ppm * 16.0 + 8.0 || real'(cfo) < ppm * 16.0 - 8.0) begin
      failures++;
      $display("FAIL: %f ppm, delta_f %0d: cfo %0d", ppm, df, cfo);
    end
    checks++;
    if (lat != 34) begin failures++; $display("FAIL: latency %0d", lat); end
  endtask

  initial begin
    for (int g = 0; g < N_GRP; g++) begin ang_a[g] = '0; ang_b[g] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(10.0, 5818, 0.05);
    run(-5.0, 5818, -0.3);
    run(20.0, 2909, 0.0);
    run(-25.0, 2909, 0.1);
    run(0.0, 5818, 0.4);
    run(3.5, 8727, -0.02);
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
