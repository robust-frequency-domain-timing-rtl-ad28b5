// Angle buffer: group angles of the captured STF symbols.
//
// N_STF columns (one per captured STF symbol) of N_GRP rows (one per
// subcarrier group). The angle stage writes UNITS rows per clock into the
// column given by its tag, when the tag's cap bit is set. Two columns can be
// read at once, combinationally, through the column selectors of the control
// (rd_col_a, rd_col_b), which is what the estimators need for their angle
// differences between two STF symbols.
//
// From the document: a buffer of six STF symbols' angles with a control mux
// choosing what the estimators see. Own choice: the register array, the tag
// that names the column, combinational reads.
module angle_buf
  import fd_sync_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_valid,
  input  logic [$clog2(N_GRP)-1:0] wr_grp,
  input  tag_t        wr_tag,
  input  ang_t        wr_ang [UNITS],
  input  logic [2:0]  rd_col_a,
  input  logic [2:0]  rd_col_b,
  output ang_t        rd_a   [N_GRP],
  output ang_t        rd_b   [N_GRP]
);
  ang_t buf_q [N_STF][N_GRP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_STF; c++)
        for (int g = 0; g < N_GRP; g++) buf_q[c][g] <= '0;
    end else if (wr_valid && wr_tag.cap && int'(wr_tag.col) < N_STF) begin
      for (int u = 0; u < UNITS; u++) buf_q[wr_tag.col][int'(wr_grp) + u] <= wr_ang[u];
    end
  end

  always_comb begin
    for (int g = 0; g < N_GRP; g++) begin
      rd_a[g] = (int'(rd_col_a) < N_STF) ? buf_q[rd_col_a][g] : '0;
      rd_b[g] = (int'(rd_col_b) < N_STF) ? buf_q[rd_col_b][g] : '0;
    end
  end
endmodule
