// Test of timing acquisition. Group angles of one STF symbol are made for a
// sampling delay tau (up to +-1.2 samples, so the angles wrap across groups)
// and a common channel phase. phase_shift must equal tau modulo one sample,
// as 0..8192 counts, within 4 counts (circularly), 35 clocks after start.
// The unwrap and regression follow the document; the test delays and
// tolerance are this testbench's.
module tb_timing_acq;
  import fd_sync_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  ang_t ang [N_GRP];
  ang_t phase_shift;
  int checks = 0, failures = 0;

  timing_acq dut (.*);
  always #5 clk = ~clk;

  function automatic ang_t wrap(input real c);
    while (c >= PI_Q) c -= 2 * PI_Q;
    while (c < -PI_Q) c += 2 * PI_Q;
    return ang_t'($rtoi(c + ((c >= 0) ? 0.5 : -0.5)));
  endfunction

  task automatic run(input real tau, input real ch);
    real e, d;
    int lat;
    for (int g = 0; g < N_GRP; g++)
      ang[g] = wrap(-2.0 * PI_Q * 8.0 * grp_x(g) * tau / N_FFT + ch);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!done && lat < 500);
    e = (tau - $floor(tau)) * 2.0 * PI_Q;
    d = real'(phase_shift) - e;
    if (d > PI_Q) d -= 2 * PI_Q;
    if (d < -PI_Q) d += 2 * PI_Q;
    checks++;
    if (d > 4.0 || d < -4.0 || phase_shift < 0 || phase_shift >= 2 * PI_Q) begin
      failures++;
      $display("FAIL: tau %f: phase_shift %0d expected %f", tau, phase_shift, e);
    end
    checks++;
    if (lat != 35) begin failures++; $display("FAIL: latency %0d", lat); end
  endtask

  initial begin
    for (int g = 0; g < N_GRP; g++) ang[g] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(0.2, 0.0);
    run(-0.172, 3000.0);
    run(0.49, -4000.0);
    run(-0.49, 1000.0);
    run(1.1, 200.0);
    run(-0.992, -2500.0);
    run(0.0, 4095.0);
    for (int i = 0; i < 10; i++) run(($urandom_range(2400) - 1200) / 1000.0, $urandom_range(8190) - 4095.0);
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
