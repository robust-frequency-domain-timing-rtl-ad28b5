// Shared constants and types of the frequency-domain timing synchronizer.
//
// The synchronizer works on the output of a 128-point FFT (IEEE 802.11ad OFDM
// mode). One FFT symbol arrives as LANES bins per clock over BEATS clocks: a
// symbol lasts 48.48 ns and the pipeline clock is 12 ns, so 4 beats of 32 bins
// keep up with the symbol rate. The 128 bins are split into N_GRP groups of GRP
// adjacent bins; the correlation and angle stages work per group, so every STF
// symbol yields N_GRP phase angles, one per subcarrier group.
//
// Angles are binary fixed point: PI_Q counts stand for pi, so one sampling
// period (2*pi of sampling phase) is 2*PI_Q = 8192 counts. Phase rates (SCO)
// carry FR extra fraction bits. The ADCM offers N_PHASE sampling phases per
// clock period, one phase step being pi/8.
//
// From the document: the 128-point FFT, the 48.48 ns symbol, the 12 ns
// clock, 16 phases, six preambles. Own choice: word lengths, the group size,
// the angle scale.
package fd_sync_pkg;

  localparam int N_FFT   = 128;            // FFT size
  localparam int LANES   = 32;             // bins per clock beat
  localparam int BEATS   = N_FFT / LANES;  // beats per symbol
  localparam int GRP     = 16;             // bins per correlation group
  localparam int N_GRP   = N_FFT / GRP;    // groups (angle buffer rows)
  localparam int UNITS   = LANES / GRP;    // correlation and angle units
  localparam int N_STF   = 6;              // STF symbols held in the angle buffer
  localparam int SW      = 12;             // width of one I or Q sample
  localparam int CW      = 2 * SW + 6;     // width of a group correlation sum
  localparam int AW      = 16;             // width of an angle
  localparam int PI_Q    = 4096;           // counts of pi
  localparam int FR      = 4;              // fraction bits of phase rates
  localparam int N_PHASE = 16;             // ADCM phases per clock period
  localparam int STEP_Q  = 2 * PI_Q / N_PHASE;  // counts of one phase step (pi/8)

  typedef struct packed {
    logic signed [SW-1:0] re;
    logic signed [SW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [CW-1:0] re;
    logic signed [CW-1:0] im;
  } csum_t;

  typedef logic signed [AW-1:0] ang_t;

  typedef enum logic [1:0] {
    SYM_OTHER = 2'd0,   // CEF, header or anything not used here
    SYM_STF   = 2'd1,   // short training field repetition
    SYM_DATA  = 2'd2    // OFDM data symbol carrying pilots
  } sym_kind_e;

  // Tag that travels with a symbol through buffer, correlation and angle.
  typedef struct packed {
    logic       cap;    // store this symbol's angles in the angle buffer
    logic [2:0] col;    // angle buffer column
  } tag_t;

  // Regression abscissa of group g: the signed centre frequency of the group
  // in units of GRP/2 bins. Bins N_FFT/2..N_FFT-1 are negative frequencies.
  function automatic int grp_x(input int g);
    return (g < N_GRP / 2) ? 2 * g + 1 : 2 * (g - N_GRP) + 1;
  endfunction

  // Sum of grp_x(g)^2 over all groups.
  function automatic int grp_sxx();
    int s;
    s = 0;
    for (int g = 0; g < N_GRP; g++) s += grp_x(g) * grp_x(g);
    return s;
  endfunction

  // Wrap an angle difference (range -4*PI_Q..4*PI_Q) into -PI_Q..PI_Q by
  // adding 0, +2pi or -2pi.
  function automatic logic signed [AW:0] wrap_pi(input logic signed [AW:0] d);
    if (d > (AW+1)'(PI_Q))       return d - (AW+1)'(2 * PI_Q);
    else if (d < -((AW+1)'(PI_Q))) return d + (AW+1)'(2 * PI_Q);
    else                return d;
  endfunction

endpackage
