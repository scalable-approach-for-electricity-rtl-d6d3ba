// lbist_top: scan-based launch-on-capture logic BIST that lowers the
// switching activity at launch by loading substitute test (ST) vectors.
//
// Datapath: LFSR -> phase shifter -> one ST generator per scan chain -> S scan
// chains of LEN scan FFs -> space compactor -> MISR -> TRA (pass/fail). The
// BIST controller drives the scan clocking and tells the ST generators whether
// the vector being shifted in is an original one (int1=0) or the q-th ST
// vector of its group (int1=1).
// Vectors are applied in groups T_(i-1), ST_i .. ST_(i+N-1), T_(i+N): a bit
// that is equal in T_(i-1) and T_(i+N) is held in all ST vectors, a bit that
// differs takes one random value R for the whole group. Each scan FF output
// thus changes at most once from T_(i-1) to T_(i+N), where the plain LBIST
// would let it change up to N+1 times.
// The combinational logic of the circuit under test is not part of this
// module: cut_data_out are the system outputs of the scan FFs (its inputs)
// and cut_data_in its outputs, captured back into the same FFs. Index [m][j]
// is scan FF SFF(j+1) of chain m+1. golden_sig is the fault-free signature.
// Protocol: pulse start for one clk cycle; busy is high during the run; when
// done rises, pass holds the verdict and signature the MISR contents.
// se, update and ck are brought out so that activity at launch can be
// observed; st_active is high while an ST vector is shifted in and st_r_used
// marks the chains whose current ST bit took the random value R.
module lbist_top
  import lbist_pkg::*;
#(
  parameter int unsigned S   = NUM_CHAINS,
  parameter int unsigned LEN = CHAIN_LEN,
  parameter int unsigned N   = N_ST,
  parameter int unsigned NV  = NUM_VECTORS,
  parameter int unsigned W   = LFSR_W,
  parameter int unsigned MW  = MISR_W,
  parameter logic [W-1:0]        TAPS = LFSR_TAPS,
  parameter logic [W-1:0]        SEED = LFSR_SEED,
  parameter logic [MW-1:0]       POLY = MISR_POLY,
  parameter logic [S-1:0][W-1:0] PS   = PS_MATRIX
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [MW-1:0]           golden_sig,
  input  logic [S-1:0][LEN-1:0]   cut_data_in,
  output logic [S-1:0][LEN-1:0]   cut_data_out,
  output logic                    se,
  output logic                    update,
  output logic                    ck,
  output logic                    st_active,
  output logic [S-1:0]            st_r_used,
  output logic                    busy,
  output logic                    done,
  output logic                    pass,
  output logic [MW-1:0]           signature
);

  localparam int unsigned QW = (N > 1) ? $clog2(N) : 1;

  logic          shift_ck, capture, lfsr_en, misr_en, init, check;
  logic          int1, tra_valid, tra_pass;
  logic [QW-1:0] q;
  logic [W-1:0]  x;
  logic [S-1:0]  o, scan_in, scan_out, r_used;
  logic [N-1:0][S-1:0] prev, next, orig;
  logic [MW-1:0] comp;

  bist_controller #(.LEN(LEN), .N(N), .NV(NV), .QW(QW)) u_ctrl (
    .clk, .rst_n, .start,
    .se, .shift_ck, .update, .ck, .capture,
    .lfsr_en, .misr_en, .init, .int1, .q, .check, .busy, .done
  );

  lfsr #(.W(W), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .load(init), .en(lfsr_en), .state(x)
  );

  phase_shifter #(.W(W), .S(S), .LEN(LEN), .N(N), .TAPS(TAPS), .PS(PS)) u_ps (
    .x, .o, .prev, .next, .orig
  );

  for (genvar m = 0; m < S; m++) begin : g_chain
    logic [N-1:0] prev_m, next_m, orig_m;
    for (genvar k = 0; k < N; k++) begin : g_q
      assign prev_m[k] = prev[k][m];
      assign next_m[k] = next[k][m];
      assign orig_m[k] = orig[k][m];
    end

    st_generator #(.N(N), .QW(QW)) u_st (
      .o_cur (o[m]), .prev(prev_m), .next(next_m), .rnd(orig_m),
      .int1, .q, .scan_in(scan_in[m]), .r_used(r_used[m])
    );

    scan_chain #(.LEN(LEN)) u_sc (
      .shift_ck, .capture, .update, .ck,
      .scan_in  (scan_in[m]),
      .scan_out (scan_out[m]),
      .data_in  (cut_data_in[m]),
      .data_out (cut_data_out[m])
    );
  end

  space_compactor #(.S(S), .M(MW)) u_comp (.chain_out(scan_out), .comp_out(comp));

  misr #(.W(MW), .POLY(POLY)) u_misr (
    .clk, .rst_n, .clear(init), .en(misr_en), .d(comp), .sig(signature)
  );

  tra #(.W(MW)) u_tra (
    .clk, .rst_n, .start(init), .check, .signature, .golden(golden_sig),
    .valid(tra_valid), .pass(tra_pass)
  );

  assign st_active = int1;
  assign st_r_used = r_used;
  assign pass      = tra_valid & tra_pass;

endmodule
