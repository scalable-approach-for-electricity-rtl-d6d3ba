// st_generator: per-chain substitute test (ST) vector logic.
//
// Mirrors the per-chain multiplexer structure of the design:
//   M3 picks, for group offset q, the phase-shifter output that carries the
//      bit of the last original vector T_(i-1) at this scan position;
//   M4 picks the output that carries the bit of the next original vector
//      T_(i+N);
//   an XOR of the two drives the select of M1: equal bits are copied
//      (sel=0, the M4 value), differing bits take the random bit R (sel=1);
//   M2 chooses the plain phase-shifter output (int1=0, original vector) or
//      the ST bit (int1=1).
// q corresponds to the select lines int2..intk (k = log2 N). R is this
// design's choice: the bit of the first replaced vector T_i at the same
// position, which stays the same for all N ST vectors of a group, so each
// scan FF output changes at most once between T_(i-1) and T_(i+N).
// Purely combinational; int1 and q must be stable for a whole shift phase.
module st_generator
  import lbist_pkg::*;
#(
  parameter int unsigned N  = N_ST,
  parameter int unsigned QW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          o_cur,    // O^m(xi): bit of the original vector
  input  logic [N-1:0]  prev,     // candidates for M3
  input  logic [N-1:0]  next,     // candidates for M4
  input  logic [N-1:0]  rnd,      // R, per group offset
  input  logic          int1,     // 1: shift in the ST vector
  input  logic [QW-1:0] q,        // group offset of the ST vector
  output logic          scan_in,  // to the scan-in of chain m
  output logic          r_used    // this bit of the ST vector took R
);

  logic m3, m4, r, sel, m1;

  always_comb begin
    m3 = prev[q];
    m4 = next[q];
    r  = rnd[q];
    sel = m3 ^ m4;
    m1 = sel ? r : m4;
    scan_in = int1 ? m1 : o_cur;
    r_used  = int1 & sel;
  end

endmodule
