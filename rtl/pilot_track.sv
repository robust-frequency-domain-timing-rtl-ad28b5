// Pilot tracking of the residual sampling clock offset.
//
// After acquisition a small residual SCO remains and the sampling instant
// slowly drifts. For every data symbol the four pilot tones (bins 27, 54, 78,
// 105) are compared with their known values X: theta_k = angle(X_k * conj(R_k)),
// which for a sampling delay tau equals 2*pi*k*tau/N_FFT (k the signed
// frequency). The differences between pilots 1 and 2 and between pilots 3
// and 4 (each pair 27 bins apart) cancel the common phase and leave the
// timing ramp. Both differences are summed over 8 symbols and averaged; the
// average is then mapped: above +DZ a -pi/8 step (step = -1), below -DZ a
// +pi/8 step (step = +1), else none. DZ = pi/8 * 27 / N_FFT in angle counts
// is the pilot difference that a sampling error of pi/8 produces.
// The pilot values (1+j, 1-j, 1-j, 1+j) are multiplied by 2*p_n - 1, p_n from
// the generator x^15 + x^14 + 1 seeded at clear.
// Timing: sym_valid presents one symbol's pilots; step_valid pulses the clock
// after the 8th symbol.
//
// From the document: pilot tones, values and polarity generator, the
// 8-symbol average and the +-pi/8 thresholds. Own choice: averaging both
// pilot pairs together, the shift direction of the generator.
module pilot_track
  import fd_sync_pkg::*;
#(
  parameter int DZ      = 108,
  parameter int AVG_SYM = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              sym_valid,
  input  cplx_t             pilot [4],
  output logic              step_valid,
  output logic signed [1:0] step,
  output logic signed [AW+1:0] avg
);
  localparam logic [15:1] SEED = 15'b110_1000_0010_1000;  // x15..x1
  localparam logic [3:0]  PIM_NEG = 4'b0110;              // sign of Im(X): -,+ for 1-j

  logic [15:1] lfsr;
  logic        pn;
  logic signed [SW+1:0] mre [4], mim [4];
  ang_t        th [4];
  logic signed [AW+5:0] acc;
  logic [$clog2(AVG_SYM+1)-1:0] cnt;

  assign pn = lfsr[14] ^ lfsr[15];

  // X * conj(R) with X = (+-1 +- j) * (2 p_n - 1)
  always_comb begin
    for (int p = 0; p < 4; p++) begin
      logic signed [SW+1:0] a, b, r, s;
      a = pn ? (SW+2)'(1) : -(SW+2)'(1);
      b = (PIM_NEG[p] ? -a : a);
      r = (SW+2)'(pilot[p].re);
      s = (SW+2)'(pilot[p].im);
      mre[p] = a * r + b * s;
      mim[p] = b * r - a * s;
    end
  end

  for (genvar p = 0; p < 4; p++) begin : g_atan
    cordic_atan #(.IW(SW+2)) u_atan (.re(mre[p]), .im(mim[p]), .angle(th[p]));
  end

  logic signed [AW:0] d12, d34;
  logic signed [AW+5:0] acc_n;
  logic signed [AW+1:0] avg_n;
  always_comb begin
    d12   = wrap_pi((AW+1)'(th[0]) - (AW+1)'(th[1]));
    d34   = wrap_pi((AW+1)'(th[2]) - (AW+1)'(th[3]));
    acc_n = acc + (AW+6)'(d12) + (AW+6)'(d34);
    avg_n = (AW+2)'(acc_n / (2 * AVG_SYM));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr <= SEED; acc <= '0; cnt <= '0;
      step_valid <= 1'b0; step <= '0; avg <= '0;
    end else begin
      step_valid <= 1'b0;
      if (clear) begin
        lfsr <= SEED; acc <= '0; cnt <= '0;
      end else if (sym_valid) begin
        lfsr <= {lfsr[14:1], pn};
        if (cnt == ($clog2(AVG_SYM+1))'(AVG_SYM - 1)) begin
          avg        <= avg_n;
          step_valid <= 1'b1;
          step       <= (avg_n > (AW+2)'(DZ)) ? -2'sd1 : (avg_n < -(AW+2)'(DZ)) ? 2'sd1 : 2'sd0;
          acc        <= '0;
          cnt        <= '0;
        end else begin
          acc <= acc_n;
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
