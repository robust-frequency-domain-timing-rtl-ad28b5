// Control of the synchronizer: acquisition sequence and estimator scheduling.
//
// pkt_start (the packet has been detected and the FFT window placed on the
// STF) starts a new acquisition. The next N_STF STF symbols are tagged for
// capture into angle buffer columns 0..N_STF-1. As the first of them arrives
// the phase controller is told to shift the sampling phase by pi; the last one
// is marked as the reference symbol of timing acquisition. When its angles
// are in the buffer, the estimators run:
//  1. columns (N_STF-1-delta, N_STF-1): timing acquisition (on the later
//     column) and CFO estimation start together;
//  2. columns (j, j+delta), j = 0, 1, ...: SCO estimation, one pair at a time,
//     each estimate going into the SCO output FIFO.
// When the SCO output has its mean and timing and CFO are done, acq_load hands
// the results to the phase controller and tracking starts: data symbols then
// go to pilot tracking. Each input symbol's first beat gives a sym_tick.
//
// From the document: six captured preambles, the +pi step after the first.
// Own choice: the order of the estimators and the whole handshake.
module sync_ctrl
  import fd_sync_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pkt_start,
  input  logic        in_valid,
  input  logic        in_first,
  input  sym_kind_e   in_kind,
  input  logic [3:0]  delta,
  input  logic        ang_valid,
  input  logic [$clog2(N_GRP)-1:0] ang_grp,
  input  tag_t        ang_tag,
  input  logic        timing_done,
  input  logic        cfo_done,
  input  logic        sco_done,
  input  logic        sco_out_valid,
  output tag_t        in_tag,
  output logic        pi_step,
  output logic        mark,
  output logic        sym_tick,
  output logic [2:0]  rd_col_a,
  output logic [2:0]  rd_col_b,
  output logic        timing_start,
  output logic        cfo_start,
  output logic        sco_start,
  output logic        sco_clear,
  output logic        acq_load,
  output logic        tracking
);
  typedef enum logic [2:0] {S_IDLE, S_ACQ, S_WAIT_ANG, S_EST0, S_SCO, S_WAIT_SCO, S_WAIT_ALL, S_TRACK}
    state_e;
  state_e     state;
  logic [2:0] cap_cnt, pair;
  logic       t_done, c_done, s_done;
  logic       stf_in;

  assign stf_in   = in_valid && in_first && in_kind == SYM_STF;
  assign sym_tick = in_valid && in_first;
  assign in_tag   = '{cap: (state == S_ACQ && int'(cap_cnt) < N_STF), col: cap_cnt};
  assign tracking = (state == S_TRACK);

  always_comb begin
    rd_col_a = 3'(N_STF - 1) - delta[2:0];
    rd_col_b = 3'(N_STF - 1);
    if (state == S_WAIT_SCO) begin   // start pulses are registered: one clock late
      rd_col_a = pair;
      rd_col_b = pair + delta[2:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cap_cnt <= '0; pair <= '0;
      t_done <= 1'b0; c_done <= 1'b0; s_done <= 1'b0;
      pi_step <= 1'b0; mark <= 1'b0; timing_start <= 1'b0; cfo_start <= 1'b0;
      sco_start <= 1'b0; sco_clear <= 1'b0; acq_load <= 1'b0;
    end else begin
      pi_step <= 1'b0; mark <= 1'b0; timing_start <= 1'b0; cfo_start <= 1'b0;
      sco_start <= 1'b0; sco_clear <= 1'b0; acq_load <= 1'b0;
      if (timing_done)   t_done <= 1'b1;
      if (cfo_done)      c_done <= 1'b1;
      if (sco_out_valid) s_done <= 1'b1;
      if (pkt_start) begin
        state <= S_ACQ; cap_cnt <= '0; sco_clear <= 1'b1;
        t_done <= 1'b0; c_done <= 1'b0; s_done <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_ACQ: if (stf_in) begin
            if (cap_cnt == 3'd0)           pi_step <= 1'b1;
            if (cap_cnt == 3'(N_STF - 1)) begin
              mark  <= 1'b1;
              state <= S_WAIT_ANG;
            end
            cap_cnt <= cap_cnt + 1'b1;
          end
          S_WAIT_ANG:
            if (ang_valid && ang_tag.cap && ang_tag.col == 3'(N_STF - 1) &&
                int'(ang_grp) == N_GRP - UNITS) state <= S_EST0;
          S_EST0: begin
            timing_start <= 1'b1;
            cfo_start    <= 1'b1;
            pair         <= '0;
            state        <= S_SCO;
          end
          S_SCO: begin
            sco_start <= 1'b1;
            state     <= S_WAIT_SCO;
          end
          S_WAIT_SCO: if (sco_done) begin
            pair <= pair + 1'b1;
            if (int'(pair) + 1 + int'(delta) < N_STF) state <= S_SCO;
            else                                      state <= S_WAIT_ALL;
          end
          S_WAIT_ALL: if (s_done && t_done && c_done) begin
            acq_load <= 1'b1;
            state    <= S_TRACK;
          end
          S_TRACK: ;
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
