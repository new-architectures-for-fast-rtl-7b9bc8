// tcodec_pkg: constants and elaboration-time helpers shared by the pipeline
// encoders and threshold decoders.
//
// The running example throughout this design is the systematic rate 1/2,
// memory 6 self-orthogonal code with parity
//   p_t = i_t ^ i_(t-1) ^ i_(t-4) ^ i_(t-6)
// (basic length L = 7, J = 4 orthogonal checks, majority threshold: decide
// "error" when more than 2 checks fail). A code or connection set is written
// as a bit vector indexed by lag: bit d set means the term delayed by d clocks
// is connected.
//
// Parallel (Y-lane) structures: lane y of block k carries bit k*Y + y. A
// term at bit lag d seen from output lane y comes from input lane x and is
// q blocks old when d = q*Y + y - x; lane_lag() gives that d, and n_cells()
// the number of pipeline cells one lane-to-lane pipeline needs.
package tcodec_pkg;

  localparam int unsigned EX_L      = 7;
  localparam bit [6:0]    EX_CODE   = 7'b1010011;  // taps at lags 0, 1, 4, 6
  localparam int unsigned EX_J      = 4;
  localparam int unsigned EX_W      = $clog2(EX_J + 1);  // 3 bits hold 0..J
  localparam int unsigned EX_THRESH = 2;           // noise estimate = (sum > 2)

  // Bit lag reached by cell q of the pipeline from input lane x to output lane y.
  function automatic int lane_lag(int q, int Y, int y, int x);
    return q * Y + y - x;
  endfunction

  // Cells per lane-to-lane pipeline so that every lag 0..L-1 is reachable.
  function automatic int n_cells(int L, int Y);
    return (L - 1 + Y - 1) / Y + 1;
  endfunction

  // Feedback SOS pipeline (column c, lag D-c, D = L-1): the lag of the one
  // syndrome inside the partial sum of column c that the current noise
  // estimate must correct (its "target syndrome"), or -1 if there is none.
  // A syndrome added by connected column c2 <= c is (c - c2) clocks old and
  // holds the noise digit being decided when code bit D-(c-c2) is set.
  function automatic int fb_target(bit [255:0] code, int L, int c);
    int D;
    D = L - 1;
    if (c >= D) return -1;
    for (int c2 = 0; c2 <= c; c2++)
      if (code[c2] && code[D - (c - c2)]) return c - c2;
    return -1;
  endfunction

  // The constants above are read by the modules' parameter defaults; linting
  // the package on its own therefore reports them as unused.
endpackage
