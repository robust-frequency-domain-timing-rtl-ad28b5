// FFT data buffer: collects one FFT symbol and hands it to the correlation.
//
// Symbols arrive as BEATS beats of LANES bins (in_first marks beat 0). The
// buffer has two banks: while one is written, the other, holding the previous
// complete symbol, is replayed beat by beat to the correlation (out_valid for
// BEATS clocks, starting the clock after the last input beat). The whole stored
// symbol is also visible on sym, with sym_valid pulsing when it is complete, so
// that the pilot tracker can pick its tones. A tag supplied with beat 0 travels
// with the symbol. Back-to-back symbols are accepted at one beat per clock.
//
// From the document: a buffer of one FFT symbol feeding the correlation.
// Own choice: two banks, the replay timing, the tag. An immediate assertion
// flags a symbol whose first beat lacks in_first.
module data_buf
  import fd_sync_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_first,
  input  cplx_t             in_bins [LANES],
  input  sym_kind_e         in_kind,
  input  tag_t              in_tag,
  output logic              out_valid,
  output logic [1:0]        out_beat,
  output cplx_t             out_bins [LANES],
  output tag_t              out_tag,
  output logic              sym_valid,
  output sym_kind_e         sym_kind,
  output cplx_t             sym [N_FFT]
);
  cplx_t     mem [2][N_FFT];
  logic      wbank, rbank;
  logic [1:0] wbeat, rbeat;
  sym_kind_e wkind, rkind;
  tag_t      wtag, rtag;
  logic      replay;
  logic [1:0] b;                          // beat of the incoming slice

  assign b = in_first ? 2'd0 : wbeat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank <= 1'b0; rbank <= 1'b1; wbeat <= '0; rbeat <= '0;
      wkind <= SYM_OTHER; rkind <= SYM_OTHER; wtag <= '0; rtag <= '0;
      replay <= 1'b0; sym_valid <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      if (replay) begin
        rbeat <= rbeat + 1'b1;
        if (rbeat == 2'(BEATS - 1)) replay <= 1'b0;
      end
      if (in_valid) begin
        if (in_first) begin
          wkind <= in_kind;
          wtag  <= in_tag;
        end
        wbeat <= b + 1'b1;
        if (b == 2'(BEATS - 1)) begin      // symbol complete: swap banks
          wbank     <= ~wbank;
          rbank     <= wbank;
          rkind     <= in_first ? in_kind : wkind;
          rtag      <= in_first ? in_tag  : wtag;
          replay    <= 1'b1;
          rbeat     <= '0;
          sym_valid <= 1'b1;
        end
      end
    end
  end

  // sample storage, no reset
  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int l = 0; l < LANES; l++)
        mem[wbank][int'(b) * LANES + l] <= in_bins[l];
    end
  end

  always_comb begin
    out_valid = replay;
    out_beat  = rbeat;
    out_tag   = rtag;
    for (int l = 0; l < LANES; l++) out_bins[l] = mem[rbank][int'(rbeat) * LANES + l];
    for (int k = 0; k < N_FFT; k++) sym[k] = mem[rbank][k];
    sym_kind = rkind;
  end

  // every symbol begins with in_first: a beat without it must continue one
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
    end else if (in_valid && !in_first) begin
      a_first_beat: assert (wbeat != 2'd0) else $error("data_buf: symbol without in_first");
    end
  end
endmodule
