// End-to-end test of the frequency-domain timing synchronizer, at the design's
// default sizes.
//
// The testbench plays the ADC, FFT and channel. It builds the STF Golay
// sequence Ga128 by the complementary recursion, takes its DFT as the
// reference spectrum and loads it. Each received symbol is synthesised in the
// frequency domain: bin k (signed frequency ks) is the transmitted value times
// exp(-j*2*pi*ks*tau/128) times the CFO rotation, plus small noise. tau, the
// sampling delay in samples, grows with the SCO and falls by 1/16 for each
// step of the DUT's phase_sel (read when a symbol starts), so the loop is
// closed. STF symbols see the continuous tau; data symbols see tau reduced to
// the nearest whole sample, the FFT window absorbing whole-sample slips.
//
// Three packets run back to back (SCO +200, -300 and +400 ppm, CFO +10, -5
// and +20 ppm), covering the SCO range the scheme is meant to tolerate.
// Checked: the acquired phase against the true sampling phase of the reference
// STF, SCO and CFO against the channel, the boundary found on the first STF
// against its whole-sample delay, and, while tracking, that the sampling
// error stays within pi/8 plus margin and that no pilot step points away
// from a clear error. Timing jumps are injected during tracking so that pilot
// tracking must step both ways. Each mechanism (boundary detection, pi step,
// acquisition load, SCO compensation up and down, pilot steps up and down)
// is counted and must occur. Symbols arrive back to back, one per 4
// clocks, and the input is never stalled; tracking must start within 92
// symbols of the packet, preambles included.
// The STF, the pilots and their polarity generator, the offsets and the
// 92-symbol limit follow the document; the channel model (no multipath) and
// the jump pattern are this testbench's.
module tb_fd_timing_sync;
  import fd_sync_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  N_DATA = 220;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ref_we = 1'b0;
  logic [6:0] ref_addr = '0;
  cplx_t ref_data = '0;
  logic [3:0] delta = 4'd2;
  logic [15:0] delta_f = 16'd5818;
  logic pkt_start = 1'b0, in_valid = 1'b0, in_first = 1'b0;
  sym_kind_e in_kind = SYM_OTHER;
  cplx_t in_bins [LANES];
  logic sco_valid, cfo_valid, phase_valid, tracking, pilot_valid;
  logic signed [31:0] sco_out, cfo_out;
  ang_t phase_shift;
  logic [3:0] phase_sel;
  logic signed [1:0] pilot_step, comp_step;
  logic signed [AW+1:0] pilot_avg;
  logic boundary_busy, boundary_valid;
  logic [6:0] boundary_shift;
  logic [63:0] boundary_power;
  int n_bd = 0, exp_bd = 0;
  int syms_since_pkt = 0;  // symbols started since pkt_start

  fd_timing_sync dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pi = 0, n_load = 0, n_comp_up = 0, n_comp_dn = 0, n_pil_up = 0, n_pil_dn = 0;
  int n_trk_checks = 0;

  real gre [N_FFT], gim [N_FFT];
  real tau0, sco_ppm, cfo_ppm, jump;
  int  ph_total;
  logic [3:0] last_sel;
  real te_last = 0.0;     // timing error of the last data symbol sent
  real tau_ref_stf;       // continuous tau of the last captured STF
  int  sym_idx;
  bit  got_sco, got_cfo, got_phase;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // unwrap phase_sel changes: a change of d (mod 16) in -7..8 steps
  always @(posedge clk) if (rst_n) begin
    int d;
    d = (int'(phase_sel) - int'(last_sel)) & 15;
    if (d > 8) d -= 16;
    ph_total += d;
    last_sel  = phase_sel;
    if (dut.pi_step)      n_pi++;
    if (boundary_valid) begin
      n_bd++;
      check(int'(boundary_shift) == exp_bd,
            $sformatf("boundary shift %0d expected %0d", boundary_shift, exp_bd));
    end
    if (pkt_start) syms_since_pkt = 0;
    else if (in_valid && in_first) syms_since_pkt++;
    // acquisition (6 preambles included) within 92 symbols
    if (dut.acq_load) begin
      n_load++;
      check(syms_since_pkt <= 92, $sformatf("tracking starts after %0d symbols", syms_since_pkt));
      $display("tracking starts after %0d symbols", syms_since_pkt);
    end
    if (comp_step == 1)   n_comp_up++;
    if (comp_step == -1)  n_comp_dn++;
    if (pilot_valid && pilot_step == 1)  n_pil_up++;
    if (pilot_valid && pilot_step == -1) n_pil_dn++;
    // a pilot step must not point away from a clear timing error
    if (pilot_valid && pilot_step != 0)
      check(real'(pilot_step) * te_last * 16.0 > -1.0,
            $sformatf("pilot step %0d against an error of %f steps", pilot_step, te_last * 16.0));
  end

  // independent pilot polarity generator x^15 + x^14 + 1
  bit [15:1] pn_state;
  function automatic int next_pn();
    bit p;
    p = pn_state[14] ^ pn_state[15];
    pn_state = {pn_state[14:1], p};
    return p ? 1 : -1;
  endfunction

  function automatic int clip(input real v);
    int i;
    i = $rtoi(v + ((v >= 0) ? 0.5 : -0.5)) + $signed($urandom_range(4)) - 2;
    if (i > 2047) i = 2047;
    if (i < -2047) i = -2047;
    return i;
  endfunction

  // one symbol: kind, sampling delay tau, CFO phase
  task automatic send_symbol(input sym_kind_e kind, input real tau, input real cph, input int pol);
    cplx_t sbin [N_FFT];
    for (int k = 0; k < N_FFT; k++) begin
      real xr, xi, ks, a, cr, ci;
      ks = (k < N_FFT / 2) ? k : k - N_FFT;
      if (kind == SYM_STF) begin
        xr = 100.0 * gre[k]; xi = 100.0 * gim[k];
      end else if (k == 27 || k == 105) begin
        xr = 100.0 * pol; xi = 100.0 * pol;
      end else if (k == 54 || k == 78) begin
        xr = 100.0 * pol; xi = -100.0 * pol;
      end else begin
        xr = $urandom_range(1) ? 800.0 : -800.0;
        xi = $urandom_range(1) ? 800.0 : -800.0;
      end
      a  = -2.0 * PI * ks * tau / N_FFT + cph;
      cr = $cos(a); ci = $sin(a);
      sbin[k].re = SW'(clip(xr * cr - xi * ci));
      sbin[k].im = SW'(clip(xr * ci + xi * cr));
    end
    for (int b = 0; b < BEATS; b++) begin
      in_valid <= 1'b1;
      in_first <= (b == 0);
      in_kind  <= kind;
      for (int l = 0; l < LANES; l++) in_bins[l] <= sbin[b * LANES + l];
      @(posedge clk);
    end
  endtask

  task automatic idle();
    in_valid <= 1'b0;
    in_first <= 1'b0;
    @(posedge clk);
  endtask

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real tau_cont();
    return tau0 + sco_ppm * 1.0e-6 * N_FFT * sym_idx + jump - ph_total / 16.0;
  endfunction

  task automatic run_packet(input real t0, input real sppm, input real cppm);
    int n_stf_sent, trk_since, jump_at [2];
    real cstep;
    tau0 = t0; sco_ppm = sppm; cfo_ppm = cppm; jump = 0.0;
    got_sco = 0; got_cfo = 0; got_phase = 0;
    sym_idx = 0; ph_total = 0;
    cstep = 2.0 * PI * cppm * 1.0e-6 * 60.0e9 * N_FFT / 2.64e9;
    pn_state = 15'b110_1000_0010_1000;
    jump_at[0] = 100; jump_at[1] = 150;
    @(posedge clk); pkt_start <= 1'b1; @(posedge clk); pkt_start <= 1'b0;
    n_stf_sent = 0;
    // preamble: 8 STF symbols, 2 others (CEF, header)
    for (int s = 0; s < 10; s++) begin
      sym_kind_e kd;
      real t;
      kd = (s < 8) ? SYM_STF : SYM_OTHER;
      t  = tau_cont();
      if (s == 0) exp_bd = int'($floor(t + 0.5)) & (N_FFT - 1);   // first captured STF
      if (s == 5) tau_ref_stf = t;      // 6th captured STF: timing reference
      send_symbol(kd, t, cstep * sym_idx, 1);
      sym_idx++;
    end
    trk_since = -1;
    for (int d = 0; d < N_DATA; d++) begin
      real t, te;
      int pol;
      if (d == jump_at[0]) jump += 0.17;
      if (d == jump_at[1]) jump -= 0.17;
      t  = tau_cont();
      te = t - $floor(t + 0.5);
      te_last = te;
      if (tracking) trk_since++;
      // pi/8 plus half a step of margin, away from the settling periods
      if (trk_since >= 24 && !(d >= jump_at[0] && d < jump_at[0] + 32)
          && !(d >= jump_at[1] && d < jump_at[1] + 32)) begin
        n_trk_checks++;
        check(te * 16.0 <= 1.5 && te * 16.0 >= -1.5,
              $sformatf("tracking error %f steps at data symbol %0d", te * 16.0, d));
      end
      pol = next_pn();
      send_symbol(SYM_DATA, te, cstep * sym_idx, pol);
      sym_idx++;
    end
    idle();
    check(got_sco && got_cfo && got_phase, "all three estimates delivered");
  endtask

  // result checks
  always @(posedge clk) if (rst_n) begin
    if (phase_valid) begin
      real exp_c, d;
      exp_c = (tau_ref_stf - $floor(tau_ref_stf)) * 2.0 * PI_Q;
      d = phase_shift - exp_c;
      if (d > PI_Q) d -= 2 * PI_Q;
      if (d < -PI_Q) d += 2 * PI_Q;
      got_phase = 1;
      check(d < 64.0 && d > -64.0,
            $sformatf("phase_shift %0d expected %f", phase_shift, exp_c));
    end
    if (sco_valid) begin
      real exp_s;
      exp_s = sco_ppm * 1.0e-6 * N_FFT * 2.0 * PI_Q * (1 << FR);
      got_sco = 1;
      check(rabs(real'(sco_out) - exp_s) < 5.0e-6 * N_FFT * 2.0 * PI_Q * (1 << FR),
            $sformatf("sco %0d expected %f", sco_out, exp_s));
    end
    if (cfo_valid) begin
      got_cfo = 1;
      check(rabs(real'(cfo_out) - cfo_ppm * 16.0) < 16.0,
            $sformatf("cfo %0d expected %f", cfo_out, cfo_ppm * 16.0));
    end
    // the input is never stalled: one symbol per BEATS clocks is accepted
  end

  initial begin
    // Golay pair by the recursion a_k = a_{k-1} | b_{k-1}, b_k = a_{k-1} | -b_{k-1}
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
    for (int l = 0; l < LANES; l++) in_bins[l] = '0;
    ph_total = 0; last_sel = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < N_FFT; k++) begin
      ref_we   <= 1'b1;
      ref_addr <= 7'(k);
      ref_data <= '{re: SW'($rtoi($floor(100.0 * gre[k] + 0.5))), im: SW'($rtoi($floor(100.0 * gim[k] + 0.5)))};
      @(posedge clk);
    end
    ref_we <= 1'b0;
    run_packet(0.2, 200.0, 10.0);
    run_packet(-0.3, -300.0, -5.0);
    run_packet(0.45, 400.0, 20.0);
    repeat (20) @(posedge clk);
    $display("mechanisms: boundary=%0d pi_step=%0d acq_load=%0d comp_up=%0d comp_down=%0d pilot_up=%0d pilot_down=%0d tracking_checks=%0d",
             n_bd, n_pi, n_load, n_comp_up, n_comp_dn, n_pil_up, n_pil_dn, n_trk_checks);
    check(n_pi == 3, "pi step once per packet");
    check(n_bd == 3, "boundary detection once per packet");
    check(n_load == 3, "acquisition load once per packet");
    check(n_comp_up > 0, "SCO compensation stepped up");
    check(n_comp_dn > 0, "SCO compensation stepped down");
    check(n_pil_up > 0, "pilot tracking stepped +pi/8");
    check(n_pil_dn > 0, "pilot tracking stepped -pi/8");
    check(n_trk_checks > 100, "enough tracking checks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
