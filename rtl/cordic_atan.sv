// Four-quadrant arctangent of a complex value by CORDIC vectoring.
//
// The synchronizer's angle stages divide Im by Re and take the arctangent; this
// unit does both at once. Inputs are given FB fraction bits so that small
// values keep their precision through the shifts. The vector is first folded into the right half plane
// (a +-pi/2 rotation), then ITER shift-and-add micro-rotations drive Im to zero
// while the rotation angles, atan(2^-i), are summed. The result is in counts of
// PI_Q per pi, range -PI_Q..PI_Q. Purely combinational; the caller registers it.
// The angle table holds round(atan(2^-i) / pi * 65536), i.e. four guard bits
// below the output LSB.
//
// The document asks only for an arctangent; the CORDIC, its table and the
// fraction bits are this design's. Bits 19:16 of the rounded angle are
// dropped by design (the result is reduced to AW bits).
module cordic_atan
  import fd_sync_pkg::*;
#(
  parameter int IW = CW      // input width of re and im
) (
  input  logic signed [IW-1:0] re,
  input  logic signed [IW-1:0] im,
  output ang_t                 angle
);
  localparam int ITER = 16;
  localparam int FB   = 16;         // fraction bits for small inputs
  localparam int XW   = IW + 2 + FB; // room for the CORDIC gain of 1.647
  localparam int GW   = 20;         // angle accumulator, pi = 65536
  localparam logic signed [GW-1:0] ATAN_TAB [ITER] = '{
    20'sd16384, 20'sd9672, 20'sd5110, 20'sd2594, 20'sd1302, 20'sd652,
    20'sd326,   20'sd163,  20'sd81,   20'sd41,   20'sd20,   20'sd10,
    20'sd5,     20'sd3,    20'sd1,    20'sd1};

  logic signed [XW-1:0] x, y, xn, yn;
  logic signed [GW-1:0] z, rounded;

  always_comb begin
    // fold into the right half plane
    if (re >= 0) begin
      x = XW'(re) <<< FB;  y = XW'(im) <<< FB;  z = '0;
    end else if (im >= 0) begin            // rotate by -pi/2
      x = XW'(im) <<< FB;  y = -(XW'(re) <<< FB); z = GW'(32768);
    end else begin                         // rotate by +pi/2
      x = -(XW'(im) <<< FB); y = XW'(re) <<< FB;  z = -GW'(32768);
    end
    for (int i = 0; i < ITER; i++) begin
      if (y >= 0) begin
        xn = x + (y >>> i);  yn = y - (x >>> i);  z = z + ATAN_TAB[i];
      end else begin
        xn = x - (y >>> i);  yn = y + (x >>> i);  z = z - ATAN_TAB[i];
      end
      x = xn; y = yn;
    end
    rounded = (z + GW'(8)) >>> 4;
    angle   = AW'(rounded);
  end
endmodule
