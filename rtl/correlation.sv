// Group cross-correlation of received bins with the STF reference.
//
// For every beat of LANES bins, each of the UNITS units multiplies its GRP bins
// R[k] by the conjugate reference C*[k] and sums the products, giving the
// partial correlation sum over one group of adjacent subcarriers,
//   corr_g = sum_{k in group g} R[k] * conj(C[k]).
// Stage 1 registers the products (the product register between multiplier and
// adder), stage 2 registers the sums, so out_valid follows in_valid by two
// clocks. out_grp is the group index of unit 0; unit u holds group out_grp+u.
//
// From the document: product with the reference and group sums, two units
// side by side. Own choice: the group size (16), the conjugate (its formula
// prints none; the phase wanted is that of R relative to C), the pipeline.
module correlation
  import fd_sync_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [1:0]  in_beat,
  input  tag_t        in_tag,
  input  cplx_t       r   [LANES],
  input  cplx_t       c   [LANES],
  output logic        out_valid,
  output logic [$clog2(N_GRP)-1:0] out_grp,
  output tag_t        out_tag,
  output csum_t       corr [UNITS]
);
  localparam int PW = 2 * SW + 1;
  typedef struct packed { logic signed [PW-1:0] re, im; } prod_t;

  prod_t      prod_q [LANES];
  logic       v1;
  logic [1:0] beat1;
  tag_t       tag1;
  csum_t      gsum [UNITS];

  // stage 2 adder trees
  always_comb begin
    for (int u = 0; u < UNITS; u++) begin
      gsum[u] = '0;
      for (int l = 0; l < GRP; l++) begin
        gsum[u].re = gsum[u].re + CW'(prod_q[u * GRP + l].re);
        gsum[u].im = gsum[u].im + CW'(prod_q[u * GRP + l].im);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; beat1 <= '0; tag1 <= '0;
      out_valid <= 1'b0; out_grp <= '0; out_tag <= '0;
      for (int l = 0; l < LANES; l++) prod_q[l] <= '0;
      for (int u = 0; u < UNITS; u++) corr[u] <= '0;
    end else begin
      // stage 1: complex multiply by the conjugate reference
      v1    <= in_valid;
      beat1 <= in_beat;
      tag1  <= in_tag;
      for (int l = 0; l < LANES; l++) begin
        prod_q[l].re <= PW'(r[l].re * c[l].re) + PW'(r[l].im * c[l].im);
        prod_q[l].im <= PW'(r[l].im * c[l].re) - PW'(r[l].re * c[l].im);
      end
      // stage 2: group sums
      out_valid <= v1;
      out_grp   <= ($clog2(N_GRP))'(int'(beat1) * UNITS);
      out_tag   <= tag1;
      for (int u = 0; u < UNITS; u++) corr[u] <= gsum[u];
    end
  end
endmodule
