// Test of the angle stage: random correlation values of all sizes and
// quadrants, plus the axes; each angle must be within 2 counts of
// atan2(Im, Re) * PI_Q / pi computed in floating point, one clock later.
// The expected angles are computed here in floating point; the tolerance is
// this design's.
module tb_angle;
  import fd_sync_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [$clog2(N_GRP)-1:0] in_grp = '0;
  tag_t in_tag = '0;
  csum_t corr [UNITS];
  logic out_valid;
  logic [$clog2(N_GRP)-1:0] out_grp;
  tag_t out_tag;
  ang_t ang [UNITS];
  int checks = 0, failures = 0;
  real exp_a [$];
  logic [127:0] exp_in [$];

  angle dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      for (int u = 0; u < UNITS; u++) begin
        real e, d;
        logic [127:0] inp;
        e = exp_a.pop_front();
        inp = exp_in.pop_front();
        d = real'(ang[u]) - e;
        if (d > PI_Q) d -= 2 * PI_Q;
        if (d < -PI_Q) d += 2 * PI_Q;
        checks++;
        if (d > 2.0 || d < -2.0) begin
          failures++; $display("FAIL: angle %0d expected %f for %0d %0d", ang[u], e, $signed(inp[127:64]), $signed(inp[63:0]));
        end
      end
    end
  end

  initial begin
    for (int u = 0; u < UNITS; u++) corr[u] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 200; t++) begin
      for (int u = 0; u < UNITS; u++) begin
        longint re, im;
        int sh;
        sh = $urandom_range(CW - 2, 6);
        re = longint'($signed($urandom)) >>> (32 - sh);
        im = longint'($signed($urandom)) >>> (32 - sh);
        if (t == 0) begin re = (u == 0) ? 1000 : -1000; im = 0; end
        if (t == 1) begin re = 0; im = (u == 0) ? 1000 : -1000; end
        if (re == 0 && im == 0) re = 1;
        corr[u] <= '{re: CW'(re), im: CW'(im)};
        exp_a.push_back($atan2(real'(im), real'(re)) / PI * PI_Q);
        exp_in.push_back({re, im});
      end
      in_valid <= 1'b1;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_a.size() != 0) begin failures++; $display("FAIL: outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
