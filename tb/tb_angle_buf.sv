// Test of the angle buffer: writes random angles, UNITS rows per clock, into
// all columns, some with the capture bit clear (must be ignored), then reads
// every pair of columns through both ports and compares with a model.
// The six columns follow the document; the access pattern is this
// testbench's.
module tb_angle_buf;
  import fd_sync_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_valid = 1'b0;
  logic [$clog2(N_GRP)-1:0] wr_grp = '0;
  tag_t wr_tag = '0;
  ang_t wr_ang [UNITS];
  logic [2:0] rd_col_a = '0, rd_col_b = '0;
  ang_t rd_a [N_GRP], rd_b [N_GRP];
  ang_t model [N_STF][N_GRP];
  int checks = 0, failures = 0;

  angle_buf dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int u = 0; u < UNITS; u++) wr_ang[u] = '0;
    for (int c = 0; c < N_STF; c++) for (int g = 0; g < N_GRP; g++) model[c][g] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int pass = 0; pass < 2; pass++)
      for (int c = 0; c < N_STF; c++)
        for (int b = 0; b < BEATS; b++) begin
          bit cap;
          cap = (pass == 0) || ((c + b) % 2 == 0);
          wr_valid <= 1'b1;
          wr_grp   <= ($clog2(N_GRP))'(b * UNITS);
          wr_tag   <= '{cap: cap, col: 3'(c)};
          for (int u = 0; u < UNITS; u++) begin
            ang_t v;
            v = ang_t'($urandom_range(2 * PI_Q) - PI_Q);
            wr_ang[u] <= v;
            if (cap) model[c][b * UNITS + u] = v;
          end
          @(posedge clk);
        end
    wr_valid <= 1'b0;
    @(posedge clk);
    for (int a = 0; a < N_STF; a++)
      for (int b = 0; b < N_STF; b++) begin
        rd_col_a <= 3'(a); rd_col_b <= 3'(b);
        @(posedge clk); #1;
        for (int g = 0; g < N_GRP; g++) begin
          checks++;
          if (rd_a[g] != model[a][g] || rd_b[g] != model[b][g]) begin
            failures++; $display("FAIL: columns %0d %0d row %0d", a, b, g);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
