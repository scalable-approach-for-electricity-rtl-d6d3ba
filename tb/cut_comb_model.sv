// cut_comb_model: behavioural stand-in for the combinational logic of the
// circuit under test, used only by the end-to-end testbenches.
//
// Each scan FF input is a small mix of scan FF outputs of its own and of
// other chains:
//   d[m][j] = o[m][j] ^ (o[m+1][j+1] & ~o[m+3][j]) ^ o[m+7][j+2]
// (chain indices modulo S, positions modulo LEN). fault forces input
// d[0][0] to 1, a stuck-at-1 fault for the BIST to find.
module cut_comb_model #(
  parameter int unsigned S   = 12,
  parameter int unsigned LEN = 3
) (
  input  logic                  fault,
  input  logic [S-1:0][LEN-1:0] o,
  output logic [S-1:0][LEN-1:0] d
);

  always_comb begin
    for (int m = 0; m < int'(S); m++)
      for (int j = 0; j < int'(LEN); j++)
        d[m][j] = o[m][j]
                ^ (o[(m + 1) % S][(j + 1) % LEN] & ~o[(m + 3) % S][j])
                ^ o[(m + 7) % S][(j + 2) % LEN];
    if (fault) d[0][0] = 1'b1;
  end

endmodule
