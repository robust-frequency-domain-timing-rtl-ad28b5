// Symbol boundary detection by parallel cross-correlation over cyclic shifts.
//
// A received STF symbol that arrives i samples later than the FFT window
// expects is, the STF being periodic, the ideal STF cyclically delayed by i;
// in the frequency domain its bins are
// R[k] = C[k] * exp(-j 2 pi i k / N). The detector correlates R against every
// cyclic shift of the reference,
//   P(i) = | sum_k R[k] * conj(C[k]) * exp(+j 2 pi i k / N) |,
// and reports the shift with the largest power (argmax over i = 0..N-1).
// The document draws N correlators side by side; here one correlator with
// LANES lanes is reused: each shift takes BEATS clocks, the search
// N_FFT * BEATS clocks. The power is compared as re^2 + im^2 of the
// correlation scaled down by 2^PS.
// Interface: the reference is written through ref_we/ref_addr/ref_data (the
// same words as the correlation reference); start latches one received symbol
// from sym; done pulses with shift (0..N-1, the delay modulo N) and its
// power in the (N_FFT * BEATS + 1)th clock after the one that holds start.
// The twiddles are round(2047 * cos(2 pi m / 128)) (sine from the quarter
// period shift) and are computed for the document's N_FFT = 128.
//
// From the document: correlation against all cyclic shifts and the argmax.
// Own choice: the shifts made by twiddles in the frequency domain, a single
// reused correlator, the squared-magnitude power.
module boundary_detect
  import fd_sync_pkg::*;
#(
  parameter int PS = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      ref_we,
  input  logic [$clog2(N_FFT)-1:0]  ref_addr,
  input  cplx_t                     ref_data,
  input  logic                      start,
  input  cplx_t                     sym [N_FFT],
  output logic                      busy,
  output logic                      done,
  output logic [$clog2(N_FFT)-1:0]  shift,
  output logic [63:0]               power
);
  localparam int TW = 12;
  localparam int LB = $clog2(N_FFT);
  localparam int QW = 2 * SW + 1;          // R * conj(C)
  localparam int MW = QW + TW;             // times a twiddle
  localparam int AW2 = MW + LB;            // sum over N_FFT bins
  localparam logic signed [TW-1:0] COS_TAB [N_FFT] = '{
    12'sd2047, 12'sd2045, 12'sd2037, 12'sd2025, 12'sd2008, 12'sd1986, 12'sd1959, 12'sd1927,
    12'sd1891, 12'sd1850, 12'sd1805, 12'sd1756, 12'sd1702, 12'sd1644, 12'sd1582, 12'sd1517,
    12'sd1447, 12'sd1375, 12'sd1299, 12'sd1219, 12'sd1137, 12'sd1052, 12'sd965, 12'sd875,
    12'sd783, 12'sd690, 12'sd594, 12'sd497, 12'sd399, 12'sd300, 12'sd201, 12'sd100,
    12'sd0, -12'sd100, -12'sd201, -12'sd300, -12'sd399, -12'sd497, -12'sd594, -12'sd690,
    -12'sd783, -12'sd875, -12'sd965, -12'sd1052, -12'sd1137, -12'sd1219, -12'sd1299, -12'sd1375,
    -12'sd1447, -12'sd1517, -12'sd1582, -12'sd1644, -12'sd1702, -12'sd1756, -12'sd1805, -12'sd1850,
    -12'sd1891, -12'sd1927, -12'sd1959, -12'sd1986, -12'sd2008, -12'sd2025, -12'sd2037, -12'sd2045,
    -12'sd2047, -12'sd2045, -12'sd2037, -12'sd2025, -12'sd2008, -12'sd1986, -12'sd1959, -12'sd1927,
    -12'sd1891, -12'sd1850, -12'sd1805, -12'sd1756, -12'sd1702, -12'sd1644, -12'sd1582, -12'sd1517,
    -12'sd1447, -12'sd1375, -12'sd1299, -12'sd1219, -12'sd1137, -12'sd1052, -12'sd965, -12'sd875,
    -12'sd783, -12'sd690, -12'sd594, -12'sd497, -12'sd399, -12'sd300, -12'sd201, -12'sd100,
    12'sd0, 12'sd100, 12'sd201, 12'sd300, 12'sd399, 12'sd497, 12'sd594, 12'sd690,
    12'sd783, 12'sd875, 12'sd965, 12'sd1052, 12'sd1137, 12'sd1219, 12'sd1299, 12'sd1375,
    12'sd1447, 12'sd1517, 12'sd1582, 12'sd1644, 12'sd1702, 12'sd1756, 12'sd1805, 12'sd1850,
    12'sd1891, 12'sd1927, 12'sd1959, 12'sd1986, 12'sd2008, 12'sd2025, 12'sd2037, 12'sd2045
  };

  cplx_t ref_q [N_FFT];
  cplx_t r_q   [N_FFT];
  logic [LB-1:0] cur;                      // shift under test
  logic [1:0]    beat;
  logic          last_beat;
  logic signed [AW2-1:0] acc_re, acc_im, sum_re, sum_im;
  logic signed [31:0]    p_re, p_im;
  logic [63:0]           p_now;

  always_ff @(posedge clk) begin
    if (ref_we) ref_q[ref_addr] <= ref_data;
  end

  // this beat's LANES terms
  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int l = 0; l < LANES; l++) begin
      int k;
      logic [LB-1:0] m;
      logic signed [QW-1:0] qr, qi;
      logic signed [TW-1:0] wc, ws;
      k  = int'(beat) * LANES + l;
      m  = LB'(int'(cur) * k);
      qr = QW'(r_q[k].re * ref_q[k].re) + QW'(r_q[k].im * ref_q[k].im);
      qi = QW'(r_q[k].im * ref_q[k].re) - QW'(r_q[k].re * ref_q[k].im);
      wc = COS_TAB[m];
      ws = COS_TAB[LB'(m - LB'(N_FFT / 4))];   // sin(x) = cos(x - pi/2)
      sum_re = sum_re + AW2'(MW'(qr * wc) - MW'(qi * ws));
      sum_im = sum_im + AW2'(MW'(qr * ws) + MW'(qi * wc));
    end
  end

  assign last_beat = (beat == 2'(BEATS - 1));
  assign p_re  = 32'((acc_re + sum_re) >>> (TW - 1 + PS));
  assign p_im  = 32'((acc_im + sum_im) >>> (TW - 1 + PS));
  assign p_now = 64'(p_re * p_re) + 64'(p_im * p_im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; shift <= '0; power <= '0;
      cur <= '0; beat <= '0; acc_re <= '0; acc_im <= '0;
      for (int k = 0; k < N_FFT; k++) r_q[k] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        for (int k = 0; k < N_FFT; k++) r_q[k] <= sym[k];
        busy <= 1'b1; cur <= '0; beat <= '0; acc_re <= '0; acc_im <= '0;
        power <= '0; shift <= '0;
      end else if (busy) begin
        beat <= beat + 1'b1;
        if (last_beat) begin
          acc_re <= '0; acc_im <= '0;
          if (p_now > power || cur == '0) begin
            power <= p_now;
            shift <= cur;
          end
          cur <= cur + 1'b1;
          if (cur == LB'(N_FFT - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          acc_re <= acc_re + sum_re;
          acc_im <= acc_im + sum_im;
        end
      end
    end
  end
endmodule
