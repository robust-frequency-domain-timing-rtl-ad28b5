// Angle stage: phase of each group correlation.
//
// One arctangent unit per correlation unit turns corr = Re + j Im into its
// angle atan2(Im, Re) (the divide-then-arctangent of the architecture, done
// here by a CORDIC in vectoring mode). The angles are registered, so
// out_valid follows in_valid by one clock; group index and tag pass along.
// Output range -PI_Q..PI_Q counts (-pi..pi).
//
// From the document: an angle per group correlation (Im/Re and arctangent in
// its figure). Own choice: CORDIC instead of divider and table, one register.
module angle
  import fd_sync_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [$clog2(N_GRP)-1:0] in_grp,
  input  tag_t        in_tag,
  input  csum_t       corr [UNITS],
  output logic        out_valid,
  output logic [$clog2(N_GRP)-1:0] out_grp,
  output tag_t        out_tag,
  output ang_t        ang  [UNITS]
);
  ang_t a [UNITS];

  for (genvar u = 0; u < UNITS; u++) begin : g_unit
    cordic_atan #(.IW(CW)) u_atan (.re(corr[u].re), .im(corr[u].im), .angle(a[u]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_grp <= '0; out_tag <= '0;
      for (int u = 0; u < UNITS; u++) ang[u] <= '0;
    end else begin
      out_valid <= in_valid;
      out_grp   <= in_grp;
      out_tag   <= in_tag;
      for (int u = 0; u < UNITS; u++) ang[u] <= a[u];
    end
  end
endmodule
