// Test of the FFT data buffer: three symbols back to back, each bin holding a
// value derived from (symbol, bin). Checks that each symbol is replayed beat
// by beat starting the clock after its last input beat, with its tag and kind,
// and that the full-symbol view matches, while the next symbol is written.
// The 4-beat symbol follows the document's clock and symbol rate; the test
// pattern is this testbench's.
module tb_data_buf;
  import fd_sync_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_first = 1'b0;
  cplx_t in_bins [LANES];
  sym_kind_e in_kind = SYM_OTHER;
  tag_t in_tag = '0;
  logic out_valid, sym_valid;
  logic [1:0] out_beat;
  cplx_t out_bins [LANES];
  tag_t out_tag;
  sym_kind_e sym_kind;
  cplx_t sym [N_FFT];
  int checks = 0, failures = 0;

  data_buf dut (.*);
  always #5 clk = ~clk;

  function automatic cplx_t val(input int s, input int k);
    return '{re: SW'(s * 300 + k), im: SW'(-(s * 7 + 3 * k))};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // output monitor
  int out_sym = 0, out_b = 0, last_in_cycle = -1, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && dut.wbeat == 2'(BEATS - 1) && !in_first) last_in_cycle = cyc;
    if (out_valid) begin
      bit ok;
      ok = (out_beat == 2'(out_b)) && out_tag.col == 3'(out_sym) && out_tag.cap == out_sym[0];
      for (int l = 0; l < LANES; l++) ok &= out_bins[l] == val(out_sym, out_b * LANES + l);
      if (out_b == 0) check(cyc == last_in_cycle + 1, $sformatf("replay of symbol %0d starts the clock after its last beat", out_sym));
      check(ok, $sformatf("replay symbol %0d beat %0d", out_sym, out_b));
      if (out_b == BEATS - 1) begin out_b = 0; out_sym++; end else out_b++;
    end
    if (sym_valid) begin
      bit ok;
      ok = (sym_kind == ((out_sym % 2) ? SYM_DATA : SYM_STF));
      for (int k = 0; k < N_FFT; k++) ok &= sym[k] == val(out_sym, k);
      check(ok, $sformatf("full symbol view %0d", out_sym));
    end
  end

  initial begin
    for (int l = 0; l < LANES; l++) in_bins[l] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int s = 0; s < 3; s++) begin
      for (int b = 0; b < BEATS; b++) begin
        in_valid <= 1'b1;
        in_first <= (b == 0);
        in_kind  <= (s % 2) ? SYM_DATA : SYM_STF;
        in_tag   <= '{cap: s[0], col: 3'(s)};
        for (int l = 0; l < LANES; l++) in_bins[l] <= val(s, b * LANES + l);
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (8) @(posedge clk);
    check(out_sym == 3, "three symbols replayed");
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
