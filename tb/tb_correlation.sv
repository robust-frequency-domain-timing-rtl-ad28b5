// Test of the group correlation: random received and reference bins for a
// stream of beats; each unit's output must equal sum(R * conj(C)) over its
// GRP bins, computed here in integers, two clocks after the input, with the
// group index beat * UNITS + unit and the tag carried along.
// The product with the conjugate reference follows the document; the data
// are random.
module tb_correlation;
  import fd_sync_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [1:0] in_beat = '0;
  tag_t in_tag = '0;
  cplx_t r [LANES], c [LANES];
  logic out_valid;
  logic [$clog2(N_GRP)-1:0] out_grp;
  tag_t out_tag;
  csum_t corr [UNITS];
  int checks = 0, failures = 0;
  longint exp_re [$], exp_im [$];
  int exp_grp [$], exp_col [$];

  correlation dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      for (int u = 0; u < UNITS; u++) begin
        longint er, ei;
        er = exp_re.pop_front(); ei = exp_im.pop_front();
        checks++;
        if (longint'(corr[u].re) != er || longint'(corr[u].im) != ei) begin
          failures++; $display("FAIL: corr %0d %0d expected %0d %0d", corr[u].re, corr[u].im, er, ei);
        end
      end
      checks++;
      if (int'(out_grp) != exp_grp.pop_front() || int'(out_tag.col) != exp_col.pop_front()) begin
        failures++; $display("FAIL: group index or tag");
      end
    end
  end

  initial begin
    int sent;
    for (int l = 0; l < LANES; l++) begin r[l] = '0; c[l] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 40; t++) begin
      cplx_t rr [LANES], cc [LANES];
      for (int l = 0; l < LANES; l++) begin
        // extremes now and then
        rr[l] = (t == 0) ? '{re: -SW'(2048), im: SW'(2047)} : '{re: SW'($urandom), im: SW'($urandom)};
        cc[l] = (t == 0) ? '{re: -SW'(2048), im: -SW'(2048)} : '{re: SW'($urandom), im: SW'($urandom)};
      end
      for (int u = 0; u < UNITS; u++) begin
        longint sr, si;
        sr = 0; si = 0;
        for (int l = u * GRP; l < (u + 1) * GRP; l++) begin
          sr += longint'(rr[l].re) * cc[l].re + longint'(rr[l].im) * cc[l].im;
          si += longint'(rr[l].im) * cc[l].re - longint'(rr[l].re) * cc[l].im;
        end
        exp_re.push_back(sr); exp_im.push_back(si);
      end
      exp_grp.push_back((t % BEATS) * UNITS);
      exp_col.push_back(t % 8);
      in_valid <= 1'b1;
      in_beat  <= 2'(t % BEATS);
      in_tag   <= '{cap: 1'b1, col: 3'(t % 8)};
      for (int l = 0; l < LANES; l++) begin r[l] <= rr[l]; c[l] <= cc[l]; end
      @(posedge clk);
      if (t % 7 == 6) begin in_valid <= 1'b0; @(posedge clk); end
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    sent = exp_grp.size();
    checks++;
    if (sent != 0) begin failures++; $display("FAIL: %0d outputs missing", sent); end
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
