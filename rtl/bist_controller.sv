// bist_controller: sequences the shift and launch-on-capture (LOC) phases of
// the LBIST and chooses, vector by vector, the original or an ST vector.
//
// A run starts on a start pulse and applies NV test vectors:
//   shift phase (se=1): LEN shift clocks. Each takes two clk cycles, shift_ck
//     high then low; the LFSR advances at the end of the low cycle and the
//     MISR samples the chain outputs at the end of the high cycle. The MISR
//     samples only in shift phases that follow a capture (response unload).
//   capture phase (se=0): a one-cycle update pulse (launch: the new vector
//     reaches the scan FF outputs), then a ck pulse (the logic under test's
//     response is taken into the system latches), then a capture pulse (the
//     response moves into the scan latches). Idle cycles separate the pulses.
// init is high for the clk cycle in which start is taken: it reseeds the
// LFSR, clears the MISR and clears the TRA verdict.
// After the NV-th capture a last shift phase unloads the final response,
// then check asks the TRA for its verdict and done rises.
// Vectors come in groups of N+1: the first of each group is an original
// vector (int1=0) and the next N are ST vectors (int1=1) with group offset
// q = 0..N-1, kept stable for the whole shift phase that loads them.
// Shift/capture ordering and the pulse sequence follow the design's LOC
// clocking; the cycle counts, the start/done handshake and the idle cycles
// are this design's choices. All pulse outputs come straight from flip-flops.
// Cycles per run: NV*(2*LEN + 7) + 2*LEN + 2 after start.
module bist_controller
  import lbist_pkg::*;
#(
  parameter int unsigned LEN = CHAIN_LEN,
  parameter int unsigned N   = N_ST,
  parameter int unsigned NV  = NUM_VECTORS,
  parameter int unsigned QW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          se,
  output logic          shift_ck,
  output logic          update,
  output logic          ck,
  output logic          capture,
  output logic          lfsr_en,
  output logic          misr_en,
  output logic          init,
  output logic          int1,
  output logic [QW-1:0] q,
  output logic          check,
  output logic          busy,
  output logic          done
);

  typedef enum logic [3:0] {
    S_IDLE, S_SH_HI, S_SH_LO, S_GAP0, S_UPD, S_GAP1, S_CK, S_GAP2, S_CAPT,
    S_GAP3, S_CHECK, S_DONE
  } state_t;

  localparam int unsigned SCW = (LEN > 1) ? $clog2(LEN) : 1;
  localparam int unsigned VCW = $clog2(NV + 1);
  localparam int unsigned GCW = $clog2(N + 1);

  state_t         state, state_n;
  logic [SCW-1:0] shift_cnt;
  logic [VCW-1:0] vec_cnt;    // captures done so far
  logic [GCW-1:0] grp;        // position of the vector being loaded in its group
  logic           unload;     // the chains hold a response to compact

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:  if (start) state_n = S_SH_HI;
      S_SH_HI: state_n = S_SH_LO;
      S_SH_LO: if (shift_cnt != SCW'(LEN - 1)) state_n = S_SH_HI;
               else if (vec_cnt == VCW'(NV))   state_n = S_CHECK;
               else                            state_n = S_GAP0;
      S_GAP0:  state_n = S_UPD;
      S_UPD:   state_n = S_GAP1;
      S_GAP1:  state_n = S_CK;
      S_CK:    state_n = S_GAP2;
      S_GAP2:  state_n = S_CAPT;
      S_CAPT:  state_n = S_GAP3;
      S_GAP3:  state_n = S_SH_HI;
      S_CHECK: state_n = S_DONE;
      S_DONE:  if (start) state_n = S_SH_HI;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      shift_cnt <= '0;
      vec_cnt   <= '0;
      grp       <= '0;
      unload    <= 1'b0;
      se        <= 1'b0;
      shift_ck  <= 1'b0;
      update    <= 1'b0;
      ck        <= 1'b0;
      capture   <= 1'b0;
      check     <= 1'b0;
      done      <= 1'b0;
    end else begin
      state    <= state_n;
      se       <= (state_n == S_SH_HI) || (state_n == S_SH_LO);
      shift_ck <= (state_n == S_SH_HI);
      update   <= (state_n == S_UPD);
      ck       <= (state_n == S_CK);
      capture  <= (state_n == S_CAPT);
      check    <= (state_n == S_CHECK);
      done     <= (state_n == S_DONE);
      if ((state == S_IDLE || state == S_DONE) && start) begin
        shift_cnt <= '0;
        vec_cnt   <= '0;
        grp       <= '0;
        unload    <= 1'b0;
      end
      if (state == S_SH_LO)
        shift_cnt <= (shift_cnt == SCW'(LEN - 1)) ? '0 : shift_cnt + 1'b1;
      if (state == S_GAP3) begin
        vec_cnt <= vec_cnt + 1'b1;
        grp     <= (grp == GCW'(N)) ? '0 : grp + 1'b1;
        unload  <= 1'b1;
      end
    end
  end

  // Synchronous controls, decoded from the registered state.
  assign lfsr_en    = (state == S_SH_LO);
  assign misr_en    = (state == S_SH_HI) && unload;
  assign init = (state == S_IDLE || state == S_DONE) && start;
  assign int1       = (grp != '0);
  assign q          = (grp == '0) ? '0 : QW'(grp - 1'b1);
  assign busy       = (state != S_IDLE) && (state != S_DONE);

  // Only one pulse of the scan clocking is high at a time, and shift_ck only
  // with se.
  a_pulses_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({shift_ck, update, ck, capture}))
    else $error("bist_controller: scan pulses overlap");
  a_shift_in_se: assert property (@(posedge clk) disable iff (!rst_n)
    shift_ck |-> se)
    else $error("bist_controller: shift_ck without se");

endmodule
