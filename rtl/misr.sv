// misr: multiple-input signature register.
//
// Internal-XOR (Galois) MISR of width W: on a clock with en high the signature
// shifts up by one, the bit that leaves at the top is fed back through POLY,
// and the W parallel inputs are XORed in:
//   sig <= {sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : 0) ^ d
// clear (synchronous) empties it at the start of a BIST run; an asynchronous
// active-low reset does the same. The design names the MISR without giving its
// polynomial or width; both are this design's choices.
module misr
  import lbist_pkg::*;
#(
  parameter int unsigned  W    = MISR_W,
  parameter logic [W-1:0] POLY = MISR_POLY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sig <= '0;
    else if (clear)  sig <= '0;
    else if (en)     sig <= {sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : '0) ^ d;
  end

endmodule
