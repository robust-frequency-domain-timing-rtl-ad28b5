// Phase controller: the sampling phase select of the multiphase clock (ADCM).
//
// The ADCM offers N_PHASE = 16 phases per clock period; phase_sel picks one,
// and raising it by one samples pi/8 (1/16 sample) earlier. The controller
// applies four kinds of correction (clear, at a new packet, stops the
// tracking of the previous one):
//  * pi_step: +pi (8 phases) after the first STF, so that the following STF
//    is sampled half a sample away from the first (acquisition sequence);
//  * acq_load: the acquired phase error and SCO. The phase error was measured
//    on the STF marked by 'mark'; the drift since then, sco times the symbols
//    elapsed, is added, and the sum goes into a phase error accumulator;
//  * every symbol after that the SCO (drift per symbol) is added to the
//    accumulator; whenever it exceeds half a phase step the phase moves one
//    step (comp_step = +-1) and one step is taken off the accumulator;
//  * pilot_step: +-1 phase from pilot tracking.
// Accumulator in angle counts with FR fraction bits. All updates take effect
// the clock after their input.
//
// From the document: the +pi step after the first STF, pi/8 steps of a
// 16-phase clock, SCO compensation and pilot steps. Own choice: the
// accumulator, the half-step rounding, the short-way rule for the acquired
// phase, the clear input.
module phase_ctrl
  import fd_sync_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,       // new packet: stop tracking
  input  logic               pi_step,
  input  logic               mark,
  input  logic               sym_tick,
  input  logic               acq_load,
  input  ang_t               acq_phase,   // 0..2pi, sampling late by this
  input  logic signed [31:0] acq_sco,     // drift per symbol
  input  logic               pilot_valid,
  input  logic signed [1:0]  pilot_step,
  output logic [3:0]         phase_sel,
  output ang_t               acq_step,    // phase step applied in acquisition
  output logic signed [1:0]  comp_step,   // SCO compensation step this clock
  output logic               tracking
);
  localparam logic signed [47:0] STEP_F = 48'(STEP_Q) <<< FR;
  localparam logic signed [47:0] HALF_F = STEP_F >>> 1;

  logic signed [47:0] err;
  logic signed [31:0] sco_q;
  logic [9:0]         elapsed;

  always_comb begin
    if (!tracking)            comp_step = 2'sd0;
    else if (err >= HALF_F)   comp_step = 2'sd1;
    else if (err < -HALF_F)   comp_step = -2'sd1;
    else                      comp_step = 2'sd0;
  end

  // next phase select and accumulator
  logic [3:0]         sel_n;
  logic signed [47:0] err_n, acq_ph;

  always_comb begin
    acq_ph = 48'(acq_phase);
    if (acq_ph >= 48'(PI_Q)) acq_ph = acq_ph - 48'(2 * PI_Q);   // take the short way
    sel_n = phase_sel;
    err_n = err;
    if (pi_step)     sel_n = sel_n + 4'(N_PHASE / 2);
    if (pilot_valid) sel_n = sel_n + 4'(pilot_step);
    if (acq_load) begin
      err_n = (acq_ph <<< FR) + 48'(acq_sco) * 48'(elapsed);
    end else if (clear) begin
      err_n = '0;
    end else if (tracking) begin
      if (comp_step == 2'sd1)       begin sel_n = sel_n + 4'd1; err_n = err_n - STEP_F; end
      else if (comp_step == -2'sd1) begin sel_n = sel_n - 4'd1; err_n = err_n + STEP_F; end
      if (sym_tick) err_n = err_n + 48'(sco_q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_sel <= '0; acq_step <= '0; err <= '0; sco_q <= '0;
      elapsed <= '0; tracking <= 1'b0;
    end else begin
      phase_sel <= sel_n;
      err       <= err_n;
      if (pi_step) acq_step <= ang_t'(PI_Q);
      if (mark) elapsed <= '0;
      else if (sym_tick && elapsed != '1) elapsed <= elapsed + 1'b1;
      if (acq_load) begin
        sco_q    <= acq_sco;
        tracking <= 1'b1;
      end else if (clear) begin
        tracking <= 1'b0;
      end
    end
  end
endmodule
