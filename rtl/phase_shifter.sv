// phase_shifter: XOR network from the LFSR bits to one output per scan chain,
// extended with the past and future configurations that the ST generators use.
//
// o[m] is O^(m+1): the XOR of the LFSR bits selected by row m of PS. Because
// every chain takes one bit per shift clock and a test vector is LEN
// shift clocks long, the bit that the same scan position holds in the test
// vector k places earlier or later is the value of the same output k*LEN
// shift clocks away. That value is a fixed XOR of the present LFSR bits; the
// tap rows are worked out at elaboration (lbist_pkg::ps_shift_row), so the
// extra outputs cost only XOR gates: the phase shifter is widened to offer
// the vectors the ST logic needs, which is the scheme's own premise.
//
// With N ST vectors after each original vector T_(i-1), the vector shifted in
// at group offset q (0..N-1) is ST_(i+q). For each q the extra outputs are
//   prev[q][m] = T_(i-1)(j)  = O^m(xi - (q+1)*n)
//   next[q][m] = T_(i+N)(j)  = O^m(xi + (N-q)*n)
//   orig[q][m] = T_i(j)      = O^m(xi - q*n)   (used as the random bit R)
// where n = LEN. Purely combinational.
// The default 12-output network is the design's worked example (two of its
// rows, O1 and O12, are this design's choice); deriving the past/future rows
// from the LFSR polynomial is this design's way of providing them.
module phase_shifter
  import lbist_pkg::*;
#(
  parameter int unsigned W         = LFSR_W,
  parameter int unsigned S         = NUM_CHAINS,
  parameter int unsigned LEN       = CHAIN_LEN,
  parameter int unsigned N         = N_ST,
  parameter logic [W-1:0] TAPS     = LFSR_TAPS,
  parameter logic [S-1:0][W-1:0] PS = PS_MATRIX
) (
  input  logic [W-1:0]        x,      // LFSR bits, x[k-1] = X_k
  output logic [S-1:0]        o,      // present outputs O^1..O^S
  output logic [N-1:0][S-1:0] prev,   // T_(i-1) bit, per group offset q
  output logic [N-1:0][S-1:0] next,   // T_(i+N) bit, per group offset q
  output logic [N-1:0][S-1:0] orig    // T_i bit, per group offset q
);

  typedef logic [N-1:0][S-1:0][W-1:0] rows_t;

  function automatic rows_t shifted_rows(int unsigned kind);
    rows_t r;
    int    d;
    for (int q = 0; q < int'(N); q++) begin
      for (int m = 0; m < int'(S); m++) begin
        case (kind)
          0:       d = -(q + 1) * int'(LEN);
          1:       d = (int'(N) - q) * int'(LEN);
          default: d = -q * int'(LEN);
        endcase
        r[q][m] = W'(ps_shift_row(64'(PS[m]), 64'(TAPS), W, d));
      end
    end
    return r;
  endfunction

  localparam rows_t PREV_ROWS = shifted_rows(0);
  localparam rows_t NEXT_ROWS = shifted_rows(1);
  localparam rows_t ORIG_ROWS = shifted_rows(2);

  always_comb begin
    for (int m = 0; m < int'(S); m++) o[m] = ^(x & PS[m]);
    for (int q = 0; q < int'(N); q++) begin
      for (int m = 0; m < int'(S); m++) begin
        prev[q][m] = ^(x & PREV_ROWS[q][m]);
        next[q][m] = ^(x & NEXT_ROWS[q][m]);
        orig[q][m] = ^(x & ORIG_ROWS[q][m]);
      end
    end
  end

endmodule
