// Frequency-domain timing acquisition: initial sampling phase error.
//
// Takes the group angles of one STF symbol. A fractional sampling delay tau
// turns bin k by -2*pi*k*tau/N_FFT, so the angles form a ramp over subcarrier
// frequency. The angles are first unwrapped in order of rising frequency: each
// steps up by the difference to its neighbour, wrapped into -pi..pi. The linear
// regression then gives the ramp as a sampling phase (in counts of pi, i.e. the
// result divided by pi is the phase in units of pi), it is negated, rounded to
// whole counts, and 2pi is added to a negative result so that phase_shift lies
// in 0..2pi (0..2*PI_Q-1 counts). phase_shift is the sampling phase by which
// the ADC samples late. start latches; done pulses 35 clocks later.
//
// From the document: unwrap, linear regression, divide by pi, correction
// into 0..2pi. Own choice: the unwrap order, keeping the result in angle
// counts. The loop indices g and p use only their low bits (by design).
module timing_acq
  import fd_sync_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  ang_t               ang [N_GRP],
  output logic               done,
  output ang_t               phase_shift
);
  logic signed [AW:0] unw [N_GRP];
  logic               start_q, reg_done;
  logic signed [31:0] slope, ph;

  // unwrap; rising frequency: groups N_GRP/2..N_GRP-1, then 0..N_GRP/2-1
  logic signed [AW:0] unw_n [N_GRP];
  always_comb begin
    for (int i = 0; i < N_GRP; i++) begin
      int g, p;
      g = (i + N_GRP / 2) % N_GRP;
      p = (i + N_GRP / 2 - 1) % N_GRP;
      if (i == 0) unw_n[g] = (AW+1)'(ang[g]);
      else        unw_n[g] = unw_n[p] + wrap_pi((AW+1)'(ang[g]) - (AW+1)'(ang[p]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < N_GRP; g++) unw[g] <= '0;
      start_q <= 1'b0;
    end else begin
      start_q <= start;
      if (start) for (int g = 0; g < N_GRP; g++) unw[g] <= unw_n[g];
    end
  end

  lin_reg u_reg (.clk, .rst_n, .start(start_q), .y(unw), .done(reg_done), .slope);

  always_comb begin
    ph = (-slope + 32'(1 << (FR - 1))) >>> FR;
    ph = ph % (2 * PI_Q);
    if (ph < 0) ph = ph + 2 * PI_Q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0; phase_shift <= '0;
    end else begin
      done <= reg_done;
      if (reg_done) phase_shift <= AW'(ph);
    end
  end
endmodule
