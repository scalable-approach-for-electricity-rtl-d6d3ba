// scan_chain: LEN scan flip-flops connected scan_out to scan_in.
//
// SFF1..SFFn as in the design's scan chain drawing: scan_in enters SFFn and
// scan_out leaves SFF1, so after n shift clocks the first bit shifted in sits
// in SFF1 and the last one in SFFn. data_out[j-1] and data_in[j-1] are the
// system output and input of SFFj, the connections to the logic under test.
// All flip-flops share the shift_ck, capture, update and ck pulses; see
// scan_ff for their timing.
module scan_chain
  import lbist_pkg::*;
#(
  parameter int unsigned LEN = CHAIN_LEN
) (
  input  logic           shift_ck,
  input  logic           capture,
  input  logic           update,
  input  logic           ck,
  input  logic           scan_in,
  output logic           scan_out,
  input  logic [LEN-1:0] data_in,
  output logic [LEN-1:0] data_out
);

  // link[j] is the scan input of SFF(j+1); link[LEN] is the chain's scan_in.
  logic [LEN:0] link;
  assign link[LEN] = scan_in;

  for (genvar j = 0; j < LEN; j++) begin : g_sff
    scan_ff u_sff (
      .shift_ck (shift_ck),
      .capture  (capture),
      .update   (update),
      .ck       (ck),
      .scan_in  (link[j+1]),
      .data_in  (data_in[j]),
      .scan_out (link[j]),
      .data_out (data_out[j])
    );
  end

  assign scan_out = link[0];

endmodule
