// Test of symbol boundary detection. The reference is the 128-point DFT of
// a Golay sequence (scaled by 100). Each trial delays it cyclically by a
// random tau (integer part 0..127 plus a fraction within +-0.3), scales it
// by a random amplitude, turns it by a random carrier phase, adds +-2 LSB
// of noise, and expects shift = round(tau) mod 128, with done exactly
// N_FFT * BEATS + 1 clocks after start and busy high in between.
// The Golay STF and the cyclic-shift search follow the document; the signal
// levels and noise are this testbench's.
module tb_boundary_detect;
  import fd_sync_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ref_we = 1'b0;
  logic [6:0] ref_addr = '0;
  cplx_t ref_data = '0;
  logic start = 1'b0;
  cplx_t sym [N_FFT];
  logic busy, done;
  logic [6:0] shift;
  logic [63:0] power;
  real gre [N_FFT], gim [N_FFT];
  int checks = 0, failures = 0;

  boundary_detect dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ga [N_FFT], gb [N_FFT], na [N_FFT], nb [N_FFT];
    int len;
    ga[0] = 1; gb[0] = 1; len = 1;
    while (len < N_FFT) begin
      for (int i = 0; i < len; i++) begin
        na[i] = ga[i]; na[i + len] = gb[i];
        nb[i] = ga[i]; nb[i + len] = -gb[i];
      end
      for (int i = 0; i < 2 * len; i++) begin ga[i] = na[i]; gb[i] = nb[i]; end
      len *= 2;
    end
    for (int k = 0; k < N_FFT; k++) begin
      gre[k] = 0.0; gim[k] = 0.0;
      for (int n = 0; n < N_FFT; n++) begin
        gre[k] += ga[n] * $cos(2.0 * PI * n * k / N_FFT);
        gim[k] -= ga[n] * $sin(2.0 * PI * n * k / N_FFT);
      end
    end
    for (int k = 0; k < N_FFT; k++) sym[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < N_FFT; k++) begin
      ref_we <= 1'b1; ref_addr <= 7'(k);
      ref_data <= '{re: SW'($rtoi($floor(100.0 * gre[k] + 0.5))), im: SW'($rtoi($floor(100.0 * gim[k] + 0.5)))};
      @(posedge clk);
    end
    ref_we <= 1'b0;
    for (int t = 0; t < 12; t++) begin
      real tau, amp, cph;
      int  exp_shift, cyc;
      tau = real'($urandom_range(127)) + (real'($urandom_range(600)) - 300.0) / 1000.0;
      if (t == 0) tau = 0.0;
      if (t == 1) tau = 127.2;
      amp = 0.3 + real'($urandom_range(700)) / 1000.0;
      cph = real'($urandom_range(6283)) / 1000.0;
      exp_shift = int'($floor(tau + 0.5)) % N_FFT;
      for (int k = 0; k < N_FFT; k++) begin
        real a, c, s;
        a = -2.0 * PI * k * tau / N_FFT + cph;
        c = $cos(a); s = $sin(a);
        sym[k] <= '{re: SW'($rtoi(amp * (100.0 * gre[k] * c - 100.0 * gim[k] * s)) + $urandom_range(4) - 2),
                    im: SW'($rtoi(amp * (100.0 * gre[k] * s + 100.0 * gim[k] * c)) + $urandom_range(4) - 2)};
      end
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      for (int k = 0; k < N_FFT; k++) sym[k] <= '0;   // the input is latched at start
      cyc = 0;
      do begin
        @(posedge clk);
        cyc++;
        if (!done) check(busy, "busy during the search");
      end while (!done && cyc < 5000);
      check(cyc == N_FFT * BEATS + 1, $sformatf("done after %0d clocks", cyc));
      check(int'(shift) == exp_shift,
            $sformatf("tau %f: shift %0d expected %0d", tau, shift, exp_shift));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
