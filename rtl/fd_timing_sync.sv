// Frequency-domain timing synchronizer for 128-FFT OFDM (IEEE 802.11ad).
//
// Works on FFT output symbols (LANES bins per clock, BEATS clocks per symbol)
// and steers the sampling phase of the ADC through the phase select of a
// 16-phase multiphase clock (ADCM), which lies outside this block.
//
// Acquisition: after pkt_start, six STF symbols are each correlated with the
// known STF spectrum per subcarrier group, and the group angles are stored in
// the angle buffer. The sampling phase is shifted by pi after the first of
// them. From the stored angles:
//   timing acquisition -> phase_shift (sampling phase error, 0..2pi),
//   SCO estimation     -> sco (sampling phase drift per symbol),
//   CFO estimation     -> cfo (carrier offset, 1/16 ppm).
// The phase controller then corrects the phase error, compensates the SCO
// symbol by symbol, and pilot tracking on the data symbols removes what is
// left, one pi/8 step at a time. The first captured STF symbol also goes to
// boundary detection, which reports its cyclic delay (0..127 samples) for
// the FFT window control outside this block.
//
// Interface: the reference spectrum is loaded through ref_we/ref_addr/ref_data
// before use. in_first marks beat 0 of a symbol, in_kind says what it is.
// delta is the symbol interval of the estimator pairs (2 by default); delta_f
// is carrier frequency * delta * N_FFT / sample rate (5818 for 60 GHz,
// 2.64 GHz, delta = 2). Symbols may arrive back to back (one every BEATS
// clocks).
//
// From the document: the blocks and their connections in its module diagram
// (buffers, correlation, angle, SCO/CFO estimation, timing acquisition, SCO
// output), pilot tracking, the phase controller and boundary detection from
// its algorithm chapter. Own choice: the control sequence, the handshakes,
// bringing out the estimates. The phase controller's own tracking flag is left
// open on purpose: the control's tracking output says the same thing.
module fd_timing_sync
  import fd_sync_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // reference spectrum load
  input  logic               ref_we,
  input  logic [6:0]         ref_addr,
  input  cplx_t              ref_data,
  // configuration
  input  logic [3:0]         delta,
  input  logic [15:0]        delta_f,
  // FFT output
  input  logic               pkt_start,
  input  logic               in_valid,
  input  logic               in_first,
  input  sym_kind_e          in_kind,
  input  cplx_t              in_bins [LANES],
  // results
  output logic               sco_valid,
  output logic signed [31:0] sco_out,
  output logic               cfo_valid,
  output logic signed [31:0] cfo_out,
  output logic               phase_valid,
  output ang_t               phase_shift,
  // sampling phase control
  output logic [3:0]         phase_sel,
  output logic               tracking,
  output logic               pilot_valid,
  output logic signed [1:0]  pilot_step,
  output logic signed [1:0]  comp_step,
  output logic signed [AW+1:0] pilot_avg,
  // symbol boundary
  output logic               boundary_busy,
  output logic               boundary_valid,
  output logic [6:0]         boundary_shift,
  output logic [63:0]        boundary_power
);
  // data buffer -> correlation
  logic       db_valid, db_sym_valid;
  logic [1:0] db_beat;
  cplx_t      db_bins [LANES];
  cplx_t      ref_bins [LANES];
  cplx_t      db_sym [N_FFT];
  tag_t       db_tag, in_tag;
  sym_kind_e  db_kind;
  // correlation -> angle -> angle buffer
  logic       co_valid, an_valid;
  logic [$clog2(N_GRP)-1:0] co_grp, an_grp;
  tag_t       co_tag, an_tag;
  csum_t      co_corr [UNITS];
  ang_t       an_ang [UNITS];
  ang_t       col_a [N_GRP], col_b [N_GRP];
  logic [2:0] rd_col_a, rd_col_b;
  // estimators
  logic               timing_start, cfo_start, sco_start, sco_clear, acq_load;
  logic               sco_est_done;
  logic signed [31:0] sco_est_val;
  logic               pi_step, mark, sym_tick;
  ang_t               acq_step;
  logic               pilot_en;

  sync_ctrl u_ctrl (
    .clk, .rst_n, .pkt_start, .in_valid, .in_first, .in_kind, .delta,
    .ang_valid(an_valid), .ang_grp(an_grp), .ang_tag(an_tag),
    .timing_done(phase_valid), .cfo_done(cfo_valid), .sco_done(sco_est_done),
    .sco_out_valid(sco_valid),
    .in_tag, .pi_step, .mark, .sym_tick, .rd_col_a, .rd_col_b,
    .timing_start, .cfo_start, .sco_start, .sco_clear, .acq_load, .tracking
  );

  data_buf u_data_buf (
    .clk, .rst_n, .in_valid, .in_first, .in_bins, .in_kind, .in_tag,
    .out_valid(db_valid), .out_beat(db_beat), .out_bins(db_bins), .out_tag(db_tag),
    .sym_valid(db_sym_valid), .sym_kind(db_kind), .sym(db_sym)
  );

  ga_buf u_ga_buf (
    .clk, .we(ref_we), .waddr(ref_addr), .wdata(ref_data),
    .rd_beat(db_beat), .rd_bins(ref_bins)
  );

  correlation u_corr (
    .clk, .rst_n, .in_valid(db_valid), .in_beat(db_beat), .in_tag(db_tag),
    .r(db_bins), .c(ref_bins),
    .out_valid(co_valid), .out_grp(co_grp), .out_tag(co_tag), .corr(co_corr)
  );

  angle u_angle (
    .clk, .rst_n, .in_valid(co_valid), .in_grp(co_grp), .in_tag(co_tag), .corr(co_corr),
    .out_valid(an_valid), .out_grp(an_grp), .out_tag(an_tag), .ang(an_ang)
  );

  angle_buf u_angle_buf (
    .clk, .rst_n, .wr_valid(an_valid), .wr_grp(an_grp), .wr_tag(an_tag), .wr_ang(an_ang),
    .rd_col_a, .rd_col_b, .rd_a(col_a), .rd_b(col_b)
  );

  timing_acq u_timing (
    .clk, .rst_n, .start(timing_start), .ang(col_b), .done(phase_valid), .phase_shift
  );

  cfo_est u_cfo (
    .clk, .rst_n, .start(cfo_start), .ang_a(col_a), .ang_b(col_b), .delta_f,
    .done(cfo_valid), .cfo(cfo_out)
  );

  sco_est u_sco (
    .clk, .rst_n, .start(sco_start), .ang_a(col_a), .ang_b(col_b), .delta,
    .done(sco_est_done), .sco(sco_est_val)
  );

  sco_out u_sco_out (
    .clk, .rst_n, .clear(sco_clear), .est_valid(sco_est_done), .est(sco_est_val),
    .step(acq_step), .delta, .out_valid(sco_valid), .sco(sco_out)
  );

  assign pilot_en = tracking && db_sym_valid && db_kind == SYM_DATA;

  pilot_track u_pilot (
    .clk, .rst_n, .clear(pkt_start), .sym_valid(pilot_en),
    .pilot('{db_sym[27], db_sym[54], db_sym[78], db_sym[105]}),
    .step_valid(pilot_valid), .step(pilot_step), .avg(pilot_avg)
  );

  phase_ctrl u_phase (
    .clk, .rst_n, .clear(pkt_start), .pi_step, .mark, .sym_tick, .acq_load,
    .acq_phase(phase_shift), .acq_sco(sco_out),
    .pilot_valid, .pilot_step, .phase_sel, .acq_step, .comp_step, .tracking()
  );

  // symbol boundary detection on the first captured STF symbol
  boundary_detect u_boundary (
    .clk, .rst_n, .ref_we, .ref_addr, .ref_data,
    .start(db_sym_valid && db_tag.cap && db_tag.col == 3'd0), .sym(db_sym),
    .busy(boundary_busy), .done(boundary_valid), .shift(boundary_shift), .power(boundary_power)
  );
endmodule
