// Test of the Golay reference buffer: writes 128 random bins, then reads
// every beat and compares each lane with a copy kept by the testbench; a
// second write pass to some bins must replace them.
// Random contents; the buffer's use follows the document.
module tb_ga_buf;
  import fd_sync_pkg::*;
  logic clk = 1'b0, we = 1'b0;
  logic [6:0] waddr = '0;
  cplx_t wdata = '0;
  logic [1:0] rd_beat = '0;
  cplx_t rd_bins [LANES];
  cplx_t model [N_FFT];
  int checks = 0, failures = 0;

  ga_buf dut (.*);
  always #5 clk = ~clk;

  task automatic read_all();
    for (int b = 0; b < BEATS; b++) begin
      rd_beat <= 2'(b);
      @(posedge clk);
      #1;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (rd_bins[l] != model[b * LANES + l]) begin
          failures++;
          $display("FAIL: bin %0d", b * LANES + l);
        end
      end
    end
  endtask

  initial begin
    for (int k = 0; k < N_FFT; k++) begin
      model[k] = '{re: SW'($urandom), im: SW'($urandom)};
      we <= 1'b1; waddr <= 7'(k); wdata <= model[k];
      @(posedge clk);
    end
    we <= 1'b0;
    read_all();
    for (int k = 5; k < N_FFT; k += 9) begin
      model[k] = '{re: SW'($urandom), im: SW'($urandom)};
      we <= 1'b1; waddr <= 7'(k); wdata <= model[k];
      @(posedge clk);
    end
    we <= 1'b0;
    read_all();
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
