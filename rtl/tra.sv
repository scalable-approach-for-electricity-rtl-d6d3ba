// tra: test response analyzer.
//
// When check is high for a clock it compares the MISR signature with the
// expected (fault-free) signature and registers the verdict: valid goes high
// and pass says whether the two were equal. start clears the verdict at the
// beginning of a run. The design names the analyzer and its Pass/Fail output;
// the expected signature being an input and the valid flag are this design's
// choices.
module tra
  import lbist_pkg::*;
#(
  parameter int unsigned W = MISR_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         check,
  input  logic [W-1:0] signature,
  input  logic [W-1:0] golden,
  output logic         valid,
  output logic         pass
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      pass  <= 1'b0;
    end else if (start) begin
      valid <= 1'b0;
      pass  <= 1'b0;
    end else if (check) begin
      valid <= 1'b1;
      pass  <= (signature == golden);
    end
  end

endmodule
