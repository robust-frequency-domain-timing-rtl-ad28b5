// Test of the SCO output stage: four estimates go into the FIFO; the output
// must be their mean plus the adjust term sign(step) * |step| / (delta * 4),
// once per full FIFO (not before the fourth estimate), with both step signs
// and after a clear.
// The FIFO, mean and signed adjust follow the document's SCO output; the
// values are random.
module tb_sco_out;
  import fd_sync_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, est_valid = 1'b0, out_valid;
  logic signed [31:0] est = '0, sco;
  ang_t step = '0;
  logic [3:0] delta = 4'd2;
  int checks = 0, failures = 0;
  int n_out = 0;

  sco_out dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && out_valid) n_out++;

  task automatic run(input int e [4], input int st, input int dl);
    int sum, exp_v, adj, lat;
    clear <= 1'b1; @(posedge clk); clear <= 1'b0;
    step <= ang_t'(st); delta <= 4'(dl);
    sum = 0;
    for (int i = 0; i < 4; i++) begin
      est <= e[i]; est_valid <= 1'b1; sum += e[i];
      @(posedge clk);
      est_valid <= 1'b0;
      if (i < 3) begin
        repeat (3) @(posedge clk);
        checks++;
        if (n_out != 0) begin failures++; $display("FAIL: output before the FIFO is full"); end
      end
    end
    adj = ((st < 0 ? -st : st) * 16) / (dl * 4);
    exp_v = sum / 4 + (st < 0 ? -adj : adj);
    lat = 0;
    while (!out_valid && lat < 200) begin @(posedge clk); lat++; end
    #1;
    checks++;
    if (sco != exp_v) begin failures++; $display("FAIL: sco %0d expected %0d", sco, exp_v); end
    @(posedge clk);
    n_out = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run('{-29453, 3368, 3350, 3358}, 4096, 2);
    run('{23673, -5044, -5046, -5042}, 4096, 2);
    run('{1000, 1200, 800, 1000}, -4096, 2);
    run('{-500, -700, -600, -600}, 2048, 1);
    run('{0, 0, 0, 0}, 0, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
