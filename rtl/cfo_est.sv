// CFO estimation from two STF symbols Delta symbols apart.
//
// A carrier frequency offset rotates every subcarrier by the same angle from
// one symbol to the next. The per-group angle differences (later minus
// earlier, wrapped into -pi..pi) are averaged over the N_GRP groups; the ramp
// that a sampling offset adds cancels in the mean because the groups sit
// symmetrically around DC. The mean is divided by
//   delta_f = carrier frequency * symbol interval / sample rate
// (the symbol interval in samples), and scaled so that the result is in
// 1/16 ppm of the carrier: cfo = mean * CFO_SCALE / delta_f, CFO_SCALE =
// 16e6 / (2 * PI_Q). start latches the inputs; done pulses 34 clocks later.
//
// From the document: the mean of the angle differences divided by delta_f.
// Own choice: the output unit, the wrapping of each difference, the divider.
// The divider's busy output is left open on purpose: the control waits for done.
module cfo_est
  import fd_sync_pkg::*;
#(
  parameter int CFO_SCALE = 1953
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  ang_t               ang_a [N_GRP],
  input  ang_t               ang_b [N_GRP],
  input  logic [15:0]        delta_f,
  output logic               done,
  output logic signed [31:0] cfo
);
  logic signed [AW+3:0] sum_q;
  logic [15:0]          df_q;
  logic                 start_q;
  logic signed [AW+3:0] sum_n;

  always_comb begin
    sum_n = '0;
    for (int g = 0; g < N_GRP; g++)
      sum_n = sum_n + (AW+4)'(wrap_pi((AW+1)'(ang_b[g]) - (AW+1)'(ang_a[g])));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q <= '0; df_q <= 16'd1; start_q <= 1'b0;
    end else begin
      start_q <= start;
      if (start) begin
        sum_q <= sum_n;
        df_q  <= delta_f;
      end
    end
  end

  // mean = sum / N_GRP; folded into the numerator to keep the fraction
  sdiv #(.NW(32), .DW(19)) u_div (
    .clk, .rst_n, .start(start_q),
    .num (32'(sum_q) * 32'(CFO_SCALE)),
    .den (19'(df_q) * 19'(N_GRP)),
    .busy(), .done, .quot(cfo)
  );
endmodule
