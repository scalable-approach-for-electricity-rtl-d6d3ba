// lbist_pkg: sizes, polynomials and the phase-shifter network shared by the
// scan-based LBIST with substitute test (ST) vectors.
//
// The default configuration is the worked example of the design: a 4-bit
// LFSR (bits X1..X4) feeding a 12-output phase shifter, one output per scan
// chain, chains of 3 scan flip-flops, and one ST vector after every original
// test vector. The LFSR and MISR polynomials, the number of test vectors and
// the MISR width are this design's own choices.
//
// LFSR convention (Fibonacci): state[k-1] holds X_k. On a step, X_k takes
// X_(k-1) and X_1 takes the XOR of the tapped bits (bit t-1 of the tap mask
// taps X_t; X_W must be tapped so that the step can be inverted).
//
// The helper functions are linear over GF(2). ps_shift_row() turns one
// phase-shifter row into the row that produces, from the present LFSR state,
// the value that output had (steps < 0) or will have (steps > 0) that many
// shift clocks away. This is how the phase shifter offers the bits of past
// and future test vectors at the same scan position.
package lbist_pkg;

  localparam int unsigned LFSR_W     = 4;   // X1..X4
  localparam int unsigned NUM_CHAINS = 12;  // phase-shifter outputs O1..O12
  localparam int unsigned CHAIN_LEN  = 3;   // n: vectors are 3 shift clocks apart
  localparam int unsigned N_ST       = 1;   // ST vectors per original vector
  localparam int unsigned MISR_W     = 4;
  localparam int unsigned NUM_VECTORS = 16; // capture phases per BIST run

  localparam logic [LFSR_W-1:0] LFSR_TAPS = 4'b1100;  // x^4 + x^3 + 1
  localparam logic [LFSR_W-1:0] LFSR_SEED = 4'b0001;
  localparam logic [MISR_W-1:0] MISR_POLY = 4'b0011;  // x^4 + x + 1

  typedef logic [NUM_CHAINS-1:0][LFSR_W-1:0] ps_matrix_t;

  // Row m-1 lists which of X1..X4 (bit k-1 = X_k) are XORed into output O^m.
  localparam ps_matrix_t PS_MATRIX = '{
    4'b1010,  // O12 = X2 ^ X4
    4'b1000,  // O11 = X4
    4'b1100,  // O10 = X3 ^ X4
    4'b1001,  // O9  = X1 ^ X4
    4'b0100,  // O8  = X3
    4'b0110,  // O7  = X2 ^ X3
    4'b1101,  // O6  = X1 ^ X3 ^ X4
    4'b0010,  // O5  = X2
    4'b0011,  // O4  = X1 ^ X2
    4'b1111,  // O3  = X1 ^ X2 ^ X3 ^ X4
    4'b0001,  // O2  = X1
    4'b0101   // O1  = X1 ^ X3
  };

  // One forward LFSR step of an arbitrary-width state (width w <= 64).
  function automatic logic [63:0] lfsr_fwd(logic [63:0] s, logic [63:0] taps, int unsigned w);
    logic [63:0] n;
    n = '0;
    for (int k = w - 1; k >= 1; k--) n[k] = s[k-1];
    n[0] = ^(s & taps);
    return n;
  endfunction

  // One backward LFSR step: the state that precedes s.
  function automatic logic [63:0] lfsr_bwd(logic [63:0] s, logic [63:0] taps, int unsigned w);
    logic [63:0] p;
    p = '0;
    for (int k = 0; k < w - 1; k++) p[k] = s[k+1];
    // s[0] = XOR of tapped previous bits; the top bit is always tapped.
    p[w-1] = s[0];
    for (int k = 0; k < w - 1; k++) if (taps[k]) p[w-1] ^= p[k];
    return p;
  endfunction

  // Row producing output value 'steps' shift clocks from now (negative: past).
  function automatic logic [63:0] ps_shift_row(logic [63:0] row, logic [63:0] taps,
                                              int unsigned w, int steps);
    logic [63:0] res, e;
    res = '0;
    for (int b = 0; b < w; b++) begin
      e = '0;
      e[b] = 1'b1;
      if (steps >= 0) for (int t = 0; t < steps; t++) e = lfsr_fwd(e, taps, w);
      else            for (int t = 0; t < -steps; t++) e = lfsr_bwd(e, taps, w);
      res[b] = ^(row & e);
    end
    return res;
  endfunction

endpackage
