// Coarse SCO estimation from two STF symbols Delta symbols apart.
//
// For each subcarrier group the angle of the earlier STF (ang_a) is subtracted
// from that of the later one (ang_b) and wrapped into -pi..pi. A sampling clock
// offset makes the sampling instant drift, which turns this difference into a
// ramp over subcarrier frequency; a common phase (CFO, channel) only shifts it.
// The linear regression gives the ramp as a sampling-phase change, which is
// negated (a later sampling instant makes the angle fall with frequency) and
// divided by the symbol interval delta. Output: sampling-phase drift per
// symbol, angle counts with FR fraction bits (8192 << FR counts = one sample).
// start latches the inputs; done pulses 67 clocks later.
//
// From the document: angle differences of two STFs, linear regression,
// division by Delta. Own choice: word lengths, the dividers (busy left open
// on purpose: the control waits for done).
module sco_est
  import fd_sync_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  ang_t               ang_a [N_GRP],
  input  ang_t               ang_b [N_GRP],
  input  logic [3:0]         delta,
  output logic               done,
  output logic signed [31:0] sco
);
  logic signed [AW:0] diff [N_GRP];
  logic               reg_done;
  logic signed [31:0] slope;
  logic [3:0]         delta_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < N_GRP; g++) diff[g] <= '0;
      delta_q <= 4'd1;
    end else if (start) begin
      for (int g = 0; g < N_GRP; g++)
        diff[g] <= wrap_pi((AW+1)'(ang_b[g]) - (AW+1)'(ang_a[g]));
      delta_q <= delta;
    end
  end

  logic start_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) start_q <= 1'b0; else start_q <= start;

  lin_reg u_reg (.clk, .rst_n, .start(start_q), .y(diff), .done(reg_done), .slope);

  sdiv #(.NW(32), .DW(4)) u_div (
    .clk, .rst_n, .start(reg_done), .num(-slope), .den(delta_q),
    .busy(), .done, .quot(sco)
  );
endmodule
