// Least-squares slope of the group angles against subcarrier frequency.
//
// y[g] are angles (or angle differences) of the N_GRP subcarrier groups. With
// the abscissa x_g = grp_x(g), the signed group centre frequency in units of
// GRP/2 bins (sum of x_g is zero, so the intercept drops out), the slope is
//   sum(x_g * y[g]) / sum(x_g^2).
// The output is that slope scaled to the whole FFT band: a sampling delay of
// tau samples turns bin k by -2*pi*k*tau/N_FFT, so slope * 2*N_GRP equals
// -2*pi*tau, the sampling phase in angle counts. It carries FR fraction bits.
// start latches y; done pulses with slope valid after the division (34 clocks).
//
// From the document: linear regression of angle against subcarrier.
// Own choice: group-centre abscissae, a constant sum of squares, the
// sequential divider (its busy output left open: the caller waits for done).
module lin_reg
  import fd_sync_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [AW:0]    y     [N_GRP],
  output logic                  done,
  output logic signed [31:0]    slope
);
  localparam int SXX = grp_sxx();
  logic signed [31:0] sxy;

  always_comb begin
    sxy = '0;
    for (int g = 0; g < N_GRP; g++) sxy = sxy + 32'(grp_x(g)) * 32'(y[g]);
  end

  sdiv #(.NW(32), .DW(16)) u_div (
    .clk, .rst_n, .start,
    .num  (sxy * 32'(2 * N_GRP) * 32'(1 << FR)),
    .den  (16'(SXX)),
    .busy (),
    .done,
    .quot (slope)
  );
endmodule
