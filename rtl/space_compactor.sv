// space_compactor: XOR compaction of the S scan-chain outputs to the M inputs
// of the MISR.
//
// Output k is the XOR of every chain m with m mod M == k (for 12 chains and a
// 4-input MISR: three chains per output). The design states only that the
// compactor reduces the number of chain outputs to the MISR width; the XOR
// grouping is this design's choice. Purely combinational.
module space_compactor
  import lbist_pkg::*;
#(
  parameter int unsigned S = NUM_CHAINS,
  parameter int unsigned M = MISR_W
) (
  input  logic [S-1:0] chain_out,
  output logic [M-1:0] comp_out
);

  always_comb begin
    comp_out = '0;
    for (int m = 0; m < int'(S); m++) comp_out[m % int'(M)] ^= chain_out[m];
  end

endmodule
