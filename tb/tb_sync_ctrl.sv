// Test of the control sequence. A packet of 8 STF symbols, 2 others and data
// symbols is presented; the testbench plays the angle stage (announcing the
// last group of each captured STF a few clocks after it arrives) and the
// estimators (done pulses a while after each start). Checked: capture tags
// 0..5 on the first six STF symbols only, the pi step on the first, mark on
// the sixth, timing and CFO started with columns (3, 5), SCO pairs (0,2),
// (1,3), (2,4), (3,5) in order, acq_load only after all results, tracking,
// and that a new pkt_start restarts acquisition.
// Six preambles and the pi step on the first follow the document; the
// estimator stand-ins are this testbench's.
module tb_sync_ctrl;
  import fd_sync_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pkt_start = 1'b0, in_valid = 1'b0, in_first = 1'b0;
  sym_kind_e in_kind = SYM_OTHER;
  logic [3:0] delta = 4'd2;
  logic ang_valid = 1'b0;
  logic [$clog2(N_GRP)-1:0] ang_grp = '0;
  tag_t ang_tag = '0;
  logic timing_done = 1'b0, cfo_done = 1'b0, sco_done = 1'b0, sco_out_valid = 1'b0;
  tag_t in_tag;
  logic pi_step, mark, sym_tick, timing_start, cfo_start, sco_start, sco_clear, acq_load, tracking;
  logic [2:0] rd_col_a, rd_col_b;
  int checks = 0, failures = 0;
  int n_pi = 0, n_mark = 0, n_load = 0, n_sco = 0, n_timing = 0, n_ticks = 0;
  int sco_cnt = 0;
  bit timing_seen = 0, cfo_seen = 0, results_given = 0;

  sync_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // estimator stand-ins
  always @(posedge clk) if (rst_n) begin
    if (pi_step) n_pi++;
    if (mark) n_mark++;
    if (sym_tick) n_ticks++;
    if (timing_start) begin
      n_timing++;
      check(rd_col_a == 3'd3 && rd_col_b == 3'd5 && cfo_start, "timing and CFO start on columns 3, 5");
      fork begin repeat (30) @(posedge clk); timing_done <= 1'b1; cfo_done <= 1'b1;
        @(posedge clk); timing_done <= 1'b0; cfo_done <= 1'b0; end join_none
    end
    if (sco_start) begin
      check(int'(rd_col_a) == n_sco && int'(rd_col_b) == n_sco + 2,
            $sformatf("SCO pair %0d has columns %0d, %0d", n_sco, rd_col_a, rd_col_b));
      n_sco++;
      fork begin repeat (20) @(posedge clk); sco_done <= 1'b1; @(posedge clk); sco_done <= 1'b0;
        if (n_sco == 4) begin repeat (10) @(posedge clk); results_given = 1; sco_out_valid <= 1'b1;
          @(posedge clk); sco_out_valid <= 1'b0; end end join_none
    end
    if (acq_load) begin
      n_load++;
      check(results_given, "acq_load after all results");
    end
  end

  task automatic symbol(input sym_kind_e k, input int exp_col, input bit exp_cap);
    for (int b = 0; b < BEATS; b++) begin
      in_valid <= 1'b1; in_first <= (b == 0); in_kind <= k;
      @(negedge clk);
      if (b == 0) check(in_tag.cap == exp_cap && (!exp_cap || int'(in_tag.col) == exp_col),
                        $sformatf("tag of symbol (cap %0d col %0d)", in_tag.cap, in_tag.col));
      @(posedge clk);
    end
    if (exp_cap) fork
      begin
        tag_t t;
        t = '{cap: 1'b1, col: 3'(exp_col)};
        repeat (6) @(posedge clk);
        ang_valid <= 1'b1; ang_grp <= ($clog2(N_GRP))'(N_GRP - UNITS); ang_tag <= t;
        @(posedge clk); ang_valid <= 1'b0;
      end
    join_none
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int pkt = 0; pkt < 2; pkt++) begin
      n_pi = 0; n_mark = 0; n_load = 0; n_sco = 0; n_timing = 0; results_given = 0;
      pkt_start <= 1'b1; @(posedge clk); pkt_start <= 1'b0;
      for (int s = 0; s < 8; s++) begin
        symbol(SYM_STF, s, s < N_STF);
        if (s == 0) check(n_pi == 1, "pi step on the first STF");
      end
      check(n_mark == 1, "one mark");
      symbol(SYM_OTHER, 0, 0);
      symbol(SYM_OTHER, 0, 0);
      for (int d = 0; d < 60; d++) symbol(SYM_DATA, 0, 0);
      in_valid <= 1'b0; in_first <= 1'b0;
      repeat (3) @(posedge clk);
      check(n_pi == 1 && n_timing == 1 && n_sco == 4 && n_load == 1, "one of each per packet");
      check(tracking, "tracking at the end of the packet");
    end
    check(n_ticks == 2 * 70, "one tick per symbol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
