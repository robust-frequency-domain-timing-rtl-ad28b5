// Test of the phase controller with hand-worked sequences: the pi step
// (+8 phases); an acquisition load whose phase error (2 steps) and SCO drift
// over the 5 symbols since 'mark' (5 * 0.25 step) give 3 immediate steps;
// then one compensation step every 4 symbols; pilot steps of both signs;
// a load taking the short way round (-2 steps) with a negative SCO; and
// clear stopping compensation.
// The +pi and +-pi/8 steps follow the document; the sequences are this
// testbench's.
module tb_phase_ctrl;
  import fd_sync_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, pi_step = 1'b0, mark = 1'b0, sym_tick = 1'b0, acq_load = 1'b0;
  ang_t acq_phase = '0;
  logic signed [31:0] acq_sco = '0;
  logic pilot_valid = 1'b0;
  logic signed [1:0] pilot_step = '0;
  logic [3:0] phase_sel;
  ang_t acq_step;
  logic signed [1:0] comp_step;
  logic tracking;
  int checks = 0, failures = 0;

  phase_ctrl dut (.*);
  always #5 clk = ~clk;

  task automatic expect_sel(input int v, input string what);
    checks++;
    if (int'(phase_sel) != (v & 15)) begin
      failures++; $display("FAIL: %s: phase_sel %0d expected %0d", what, phase_sel, v & 15);
    end
  endtask

  typedef enum {P_PI, P_MARK, P_LOAD, P_PILOT, P_CLEAR} pulse_e;
  task automatic pulse(input pulse_e w);
    unique case (w)
      P_PI:    pi_step     <= 1'b1;
      P_MARK:  mark        <= 1'b1;
      P_LOAD:  acq_load    <= 1'b1;
      P_PILOT: pilot_valid <= 1'b1;
      P_CLEAR: clear       <= 1'b1;
    endcase
    @(posedge clk);
    {pi_step, mark, acq_load, pilot_valid, clear} <= '0;
  endtask

  task automatic ticks(input int n);
    repeat (n) begin sym_tick <= 1'b1; @(posedge clk); sym_tick <= 1'b0; @(posedge clk); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    expect_sel(0, "after reset");
    pulse(P_PI); #1;
    expect_sel(8, "pi step");
    checks++; if (acq_step != PI_Q) begin failures++; $display("FAIL: acq_step"); end
    pulse(P_MARK);
    ticks(5);
    acq_phase <= ang_t'(1024);              // 2 steps late
    acq_sco   <= 32'sd2048;                 // a quarter step per symbol
    pulse(P_LOAD);
    repeat (5) @(posedge clk); #1;
    expect_sel(11, "load: 2 + 1.25 steps -> 3");
    checks++; if (!tracking) begin failures++; $display("FAIL: not tracking"); end
    ticks(1); #1; expect_sel(12, "first compensation step");
    ticks(3); #1; expect_sel(12, "no step for 3 symbols");
    ticks(1); #1; expect_sel(13, "step after the 4th symbol");
    ticks(8); #1; expect_sel(15, "two steps in 8 symbols");
    pilot_step <= 2'sd1; pulse(P_PILOT); #1; expect_sel(16, "pilot +1");
    pilot_step <= -2'sd1; pulse(P_PILOT); pulse(P_PILOT); #1; expect_sel(14, "pilot -1 twice");
    pulse(P_CLEAR);
    ticks(8); #1; expect_sel(14, "no compensation after clear");
    checks++; if (tracking) begin failures++; $display("FAIL: still tracking"); end
    pulse(P_MARK);
    ticks(2);
    acq_phase <= ang_t'(2 * PI_Q - 1024);    // 2 steps early: short way
    acq_sco   <= -32'sd4096;                // half a step per symbol, negative
    pulse(P_LOAD);
    repeat (6) @(posedge clk); #1;
    expect_sel(14 - 2 - 1, "load: -2 - 1 steps");
    ticks(2); #1; expect_sel(10, "negative compensation");
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
