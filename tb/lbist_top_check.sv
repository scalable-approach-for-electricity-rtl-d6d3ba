// lbist_top_check: the end-to-end check of lbist_top_tb for one set of sizes
// (N ST vectors per group, chains of LEN scan FFs, NV vectors), packaged so
// that several sizes can run side by side. fin rises when its three runs are
// over; checks and failures are its counts. The phase shifter stays at 12
// outputs of a 4-bit LFSR.
`include "tb_macros.svh"
module lbist_top_check
  import lbist_pkg::*;
#(
  parameter int unsigned N   = 2,
  parameter int unsigned LEN = 3,
  parameter int unsigned NV  = 12
) (
  output logic fin,
  output int   checks_o,
  output int   failures_o
);
  initial fin = 1'b0;
  assign checks_o = checks;
  assign failures_o = failures;

  localparam int unsigned S  = NUM_CHAINS;
  localparam int unsigned MW = MISR_W;
  localparam int unsigned NT = NV + N + 2;     // original vectors in the model
  localparam int unsigned RUN_CYCLES = NV * (2 * LEN + 7) + 2 * LEN + 2;

  typedef logic [S-1:0][LEN-1:0] vec_t;

  logic clk = 0, rst_n = 0, start = 0, fault = 0;
  logic [MW-1:0] golden_sig = '0;
  vec_t cut_data_in, cut_data_out;
  logic se, update, ck, st_active, busy, done, pass;
  logic [S-1:0] st_r_used;
  logic [MW-1:0] signature;
  int checks = 0, failures = 0;

  lbist_top #(.N(N), .LEN(LEN), .NV(NV)) dut (
    .clk, .rst_n, .start, .golden_sig, .cut_data_in, .cut_data_out,
    .se, .update, .ck, .st_active, .st_r_used, .busy, .done, .pass, .signature
  );

  cut_comb_model #(.S(S), .LEN(LEN)) u_cut (.fault, .o(cut_data_out), .d(cut_data_in));

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  vec_t T [NT];            // original LFSR/phase-shifter vectors
  vec_t A [NV];            // vectors the design should apply
  vec_t seen [NV];         // vectors observed at the scan FF outputs
  int   model_r_bits, model_held_bits;

  // Phase-shifter outputs O1..O12 (bit m-1 is O^m) of LFSR state X4..X1.
  function automatic logic [11:0] ps_out(logic [3:0] s);
    logic x1, x2, x3, x4;
    {x4, x3, x2, x1} = s;
    return {x2 ^ x4, x4, x3 ^ x4, x1 ^ x4, x3, x2 ^ x3, x1 ^ x3 ^ x4, x2,
            x1 ^ x2, x1 ^ x2 ^ x3 ^ x4, x1, x1 ^ x3};
  endfunction

  function automatic vec_t comb(vec_t o, logic f);
    vec_t d;
    for (int m = 0; m < int'(S); m++)
      for (int j = 0; j < int'(LEN); j++)
        d[m][j] = o[m][j] ^ (o[(m + 1) % S][(j + 1) % LEN] & ~o[(m + 3) % S][j])
                ^ o[(m + 7) % S][(j + 2) % LEN];
    if (f) d[0][0] = 1'b1;
    return d;
  endfunction

  // Unload every response SFF1 first, 12 chains XOR-compacted onto 4 MISR
  // inputs (chains k, k+4, k+8), MISR x^4 + x + 1.
  function automatic logic [3:0] signature_of(logic f);
    logic [3:0] sig, dd;
    vec_t r;
    sig = '0;
    for (int v = 0; v < int'(NV); v++) begin
      r = comb(A[v], f);
      for (int c = 0; c < int'(LEN); c++) begin
        dd = '0;
        for (int m = 0; m < int'(S); m++) dd[m % 4] ^= r[m][c];
        sig = {sig[2] ^ dd[3], sig[1] ^ dd[2], sig[0] ^ sig[3] ^ dd[1], sig[3] ^ dd[0]};
      end
    end
    return sig;
  endfunction

  initial begin
    logic [3:0] st;
    logic [11:0] o;
    int r, g;
    st = 4'b0001;
    for (int t = 0; t < int'(NT * LEN); t++) begin
      o = ps_out(st);
      for (int m = 0; m < int'(S); m++) T[t / LEN][m][t % LEN] = o[m];
      st = {st[2:0], st[3] ^ st[2]};
    end
    model_r_bits = 0;
    model_held_bits = 0;
    for (int v = 0; v < int'(NV); v++) begin
      r = v % (N + 1);
      g = v - r;
      if (r == 0) A[v] = T[v];
      else
        for (int m = 0; m < int'(S); m++)
          for (int c = 0; c < int'(LEN); c++)
            if (T[g][m][c] == T[g + N + 1][m][c]) begin
              A[v][m][c] = T[g][m][c];
              model_held_bits++;
            end else begin
              A[v][m][c] = T[g + 1][m][c];
              model_r_bits++;
            end
    end
  end

  // ---------------- monitors ----------------
  int vidx, phase, n_orig, n_st, dut_r_bits, launch_toggles;
  vec_t resp_q;
  logic se_q;

  always @(negedge update) begin
    if (rst_n && vidx < int'(NV)) begin
      `CHECK(cut_data_out == A[vidx], $sformatf("vector %0d applied %h, expected %h", vidx, cut_data_out, A[vidx]))
      `CHECK(st_active == ((vidx % (N + 1)) != 0), $sformatf("vector %0d: st_active %b", vidx, st_active))
      seen[vidx] = cut_data_out;
      if (vidx > 0) launch_toggles += $countones(cut_data_out ^ resp_q);
      if (st_active) n_st++; else n_orig++;
    end
    vidx++;
  end

  always @(negedge ck) resp_q = cut_data_out;

  always @(negedge clk) begin
    se_q <= se;
    if (se && !se_q) phase++;
    if (dut.shift_ck && st_active && phase <= int'(NV)) dut_r_bits += $countones(st_r_used);
  end

  // ---------------- stimulus ----------------
  task automatic run(input logic [3:0] gold, input logic f, output logic p, output int cycles);
    vidx = 0;
    phase = 0;
    fault = f;
    golden_sig = gold;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    p = pass;
  endtask

  int n_pass, n_fail_golden, n_fail_fault, n_groups;
  logic [3:0] good_sig, bad_sig;
  logic p;
  int cyc;

  initial begin
    int st_tr, conv_tr, hd_ends;
    n_orig = 0; n_st = 0; dut_r_bits = 0; launch_toggles = 0;
    n_pass = 0; n_fail_golden = 0; n_fail_fault = 0; n_groups = 0;
    se_q = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    good_sig = signature_of(1'b0);
    bad_sig  = signature_of(1'b1);

    // run 1: fault-free circuit, right expected signature
    run(good_sig, 1'b0, p, cyc);
    `CHECK(p, "fault-free run passes")
    `CHECK(signature == good_sig, $sformatf("signature %h, expected %h", signature, good_sig))
    `CHECK(cyc == int'(RUN_CYCLES), $sformatf("run took %0d cycles, expected %0d", cyc, RUN_CYCLES))
    `CHECK(vidx == int'(NV), $sformatf("%0d launches, expected %0d", vidx, NV))
    `CHECK(dut_r_bits == model_r_bits, $sformatf("ST bits that took R: %0d, expected %0d", dut_r_bits, model_r_bits))
    if (p) n_pass++;

    // Activity at launch: from T_g to T_(g+N+1) every bit may change only once.
    st_tr = 0; conv_tr = 0;
    for (int g = 0; g + int'(N) + 1 < int'(NV); g += int'(N) + 1) begin
      int sum;
      sum = 0;
      for (int v = g + 1; v <= g + int'(N) + 1; v++) begin
        sum += $countones(seen[v] ^ seen[v-1]);
        conv_tr += $countones(T[v] ^ T[v-1]);
      end
      hd_ends = $countones(T[g] ^ T[g + N + 1]);
      `CHECK(sum == hd_ends, $sformatf("group at %0d: %0d toggles, %0d bits differ", g, sum, hd_ends))
      st_tr += sum;
      n_groups++;
    end
    `CHECK(st_tr <= conv_tr, "fewer scan FF toggles than with the original vectors")
    $display("[N=%0d LEN=%0d NV=%0d] vector-to-vector toggles: %0d with ST vectors, %0d with original vectors (%0d%% fewer); ST bits held %0d, set to R %0d; toggles at launch from the captured responses %0d",
             N, LEN, NV, st_tr, conv_tr, (conv_tr > 0) ? (100 * (conv_tr - st_tr)) / conv_tr : 0,
             model_held_bits, model_r_bits, launch_toggles);

    // run 2: stuck-at-1 fault in the circuit under test
    run(good_sig, 1'b1, p, cyc);
    `CHECK(signature == bad_sig, $sformatf("faulty signature %h, expected %h", signature, bad_sig))
    `CHECK(p == (bad_sig == good_sig), "verdict with the fault")
    if (!p) n_fail_fault++;

    // run 3: wrong expected signature
    run(~good_sig, 1'b0, p, cyc);
    `CHECK(!p, "wrong expected signature fails")
    `CHECK(signature == good_sig, "signature repeats on a new run")
    if (!p) n_fail_golden++;

    `CHECK(n_orig > 0, "original vectors applied")
    `CHECK(n_st > 0, "ST vectors applied")
    `CHECK(model_r_bits > 0 && dut_r_bits > 0, "ST bits set to R")
    `CHECK(model_held_bits > 0, "ST bits held")
    `CHECK(n_groups > 0, "complete ST groups")
    `CHECK(n_pass > 0, "pass verdict")
    `CHECK(n_fail_fault > 0, "fault detected")
    `CHECK(n_fail_golden > 0, "signature mismatch detected")
    $display("[N=%0d] mechanisms: original vectors %0d, ST vectors %0d, groups %0d, pass %0d, fault detected %0d, mismatch detected %0d",
             N, n_orig, n_st, n_groups, n_pass, n_fail_fault, n_fail_golden);
    fin = 1'b1;
  end

  initial begin
    #(4 * 3 * (RUN_CYCLES + 10) * 10 + 1000);
    failures++;
    $display("FAIL: watchdog");
    fin = 1'b1;
  end
endmodule
