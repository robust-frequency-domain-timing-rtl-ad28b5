// FFT Golay sequence buffer: the frequency-domain STF reference C[k].
//
// Holds the 128-point FFT of the Golay sequence Ga128 that makes up the STF,
// one complex value per bin, as the correlation's reference. It is written
// through a simple port (one bin per clock) before reception starts and read a
// beat at a time: rd_beat selects LANES consecutive bins, combinationally, in
// step with the data buffer's replay. Storing the reference in a writable
// buffer rather than a ROM lets the same hardware use any reference scaling.
//
// From the document: a buffer holding the FFT of the Golay sequence.
// Own choice: writable instead of a ROM, combinational read.
module ga_buf
  import fd_sync_pkg::*;
(
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(N_FFT)-1:0]  waddr,
  input  cplx_t                     wdata,
  input  logic [1:0]                rd_beat,
  output cplx_t                     rd_bins [LANES]
);
  cplx_t mem [N_FFT];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) rd_bins[l] = mem[int'(rd_beat) * LANES + l];
  end
endmodule
