// lfsr: pseudorandom pattern generator of the LBIST.
//
// A W-bit Fibonacci LFSR. state[k-1] is LFSR bit X_k. On every clock with en
// high (one step per shift clock of the scan chains) X_k takes X_(k-1) and
// X_1 takes the XOR of the bits selected by TAPS. An asynchronous active-low
// reset, and a clock with load high (start of a BIST run), load SEED, which
// must not be zero. The width follows the design's
// example (4 bits); the polynomial, seed and reset are this design's choices.
// Timing: state changes on the rising clk edge that ends a cycle with en=1.
module lfsr
  import lbist_pkg::*;
#(
  parameter int unsigned      W    = LFSR_W,
  parameter logic [W-1:0]     TAPS = LFSR_TAPS,
  parameter logic [W-1:0]     SEED = LFSR_SEED
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [W-1:0] state
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (en)   state <= {state[W-2:0], ^(state & TAPS)};
  end

  initial begin
    assert (SEED != '0) else $error("lfsr: SEED must be non-zero");
    assert (TAPS[W-1])  else $error("lfsr: TAPS must include X_W");
  end

endmodule
