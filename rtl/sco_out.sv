// SCO output stage: averages the SCO estimates and removes the known step.
//
// The SCO estimator delivers one estimate per STF pair (j, j+Delta). They
// enter a FIFO of DEPTH entries; when it is full the mean is formed. During
// acquisition the phase controller shifts the sampling phase on purpose (by pi
// after the first STF), and the pair that straddles that shift sees it as
// extra drift: step / Delta spread over the DEPTH estimates. The SCO adjust
// term |step| / (Delta * DEPTH) is computed and added to the mean with the
// sign of the applied step (the 1 / -1 selector).
// clear empties the FIFO; out_valid pulses once per full FIFO, ~38 clocks
// after the DEPTH-th estimate. Units as in the SCO estimator.
//
// From the document: the FIFO, the mean and an SCO adjust term selected by
// the sign of the step. Not built: the document also feeds CFO into the
// adjust without saying how; it is not used here. The divider's busy output
// is left open on purpose.
module sco_out
  import fd_sync_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               est_valid,
  input  logic signed [31:0] est,
  input  ang_t               step,       // sampling phase step applied in the window
  input  logic [3:0]         delta,
  output logic               out_valid,
  output logic signed [31:0] sco
);
  logic signed [31:0] fifo [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] fill;
  logic signed [31:0] mean_q, adj;
  logic               adj_start, adj_done, step_neg;
  logic signed [31:0] fsum;                 // the new estimate plus the newest DEPTH-1

  always_comb begin
    fsum = est;
    for (int i = 0; i < DEPTH - 1; i++) fsum = fsum + fifo[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) fifo[i] <= '0;
      fill <= '0; mean_q <= '0; adj_start <= 1'b0; step_neg <= 1'b0;
    end else begin
      adj_start <= 1'b0;
      if (clear) begin
        fill <= '0;
      end else if (est_valid) begin
        fifo[0] <= est;
        for (int i = 1; i < DEPTH; i++) fifo[i] <= fifo[i-1];
        if (fill == ($clog2(DEPTH+1))'(DEPTH - 1)) begin
          mean_q    <= fsum / DEPTH;
          adj_start <= 1'b1;
          step_neg  <= step[AW-1];
        end
        if (fill != ($clog2(DEPTH+1))'(DEPTH)) fill <= fill + 1'b1;
      end
    end
  end

  // SCO adjust: |step| / (Delta * DEPTH), with FR fraction bits
  sdiv #(.NW(32), .DW(8)) u_adj (
    .clk, .rst_n, .start(adj_start),
    .num ((step[AW-1] ? -32'(step) : 32'(step)) <<< FR),
    .den (8'(delta) * 8'(DEPTH)),
    .busy(), .done(adj_done), .quot(adj)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; sco <= '0;
    end else begin
      out_valid <= adj_done;
      if (adj_done) sco <= mean_q + (step_neg ? -adj : adj);
    end
  end
endmodule
