// bist_controller_tb: one run of 7 vectors with chains of 3 and N = 2 ST
// vectors per group, then a second run. Checks the pulse counts, the order
// update -> ck -> capture in every capture phase, the int1/q pattern
// (original, ST q=0, ST q=1, original, ...) held through each shift phase,
// that the MISR samples only while unloading responses, and the cycle count
// from start to done, NV*(2*LEN+7) + 2*LEN + 2.
`include "tb_macros.svh"
module bist_controller_tb;
  localparam int LEN = 3, N = 2, NV = 7;
  logic clk = 0, rst_n = 0, start = 0;
  logic se, shift_ck, update, ck, capture, lfsr_en, misr_en, init, int1, check, busy, done;
  logic [0:0] q;
  int checks = 0, failures = 0;

  bist_controller #(.LEN(LEN), .N(N), .NV(NV)) dut (
    .clk, .rst_n, .start, .se, .shift_ck, .update, .ck, .capture, .lfsr_en,
    .misr_en, .init, .int1, .q, .check, .busy, .done
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_once();
    int n_shift, n_upd, n_ck, n_cap, n_misr, n_lfsr, n_check, cycles, phase, last;
    logic in_shift;
    n_shift = 0; n_upd = 0; n_ck = 0; n_cap = 0; n_misr = 0; n_lfsr = 0; n_check = 0;
    cycles = 0; phase = 0; in_shift = 0; last = 0;  // 0 none, 1 update, 2 ck, 3 capture
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 1;
    while (!done) begin
      // sample in the middle of a cycle
      if (shift_ck || (se && !in_shift)) begin
        if (!in_shift) begin
          in_shift = 1;
          `CHECK(last == 3 || phase == 0, $sformatf("shift phase %0d follows a capture", phase))
        end
        `CHECK(se, "se high while shifting")
        `CHECK(int1 == ((phase % (N + 1)) != 0), $sformatf("phase %0d: int1 %b", phase, int1))
        if (int1) `CHECK(int'(q) == (phase % (N + 1)) - 1, $sformatf("phase %0d: q %0d", phase, q))
        `CHECK(misr_en == (shift_ck && phase > 0), $sformatf("phase %0d: misr_en %b", phase, misr_en))
      end
      if (!se && in_shift) begin
        in_shift = 0;
        phase++;
        last = 0;
      end
      if (update)  begin n_upd++;   `CHECK(last == 0, "update first in capture phase") last = 1; end
      if (ck)      begin n_ck++;    `CHECK(last == 1, "ck after update") last = 2; end
      if (capture) begin n_cap++;   `CHECK(last == 2, "capture after ck") last = 3; end
      if (shift_ck) n_shift++;
      if (misr_en)  n_misr++;
      if (lfsr_en)  n_lfsr++;
      if (check)    n_check++;
      `CHECK(busy, "busy during the run")
      `CHECK(!(update || ck || capture) || !se, "no capture pulse while se")
      @(negedge clk);
      cycles++;
    end
    `CHECK(n_shift == (NV + 1) * LEN, $sformatf("shift clocks %0d", n_shift))
    `CHECK(n_lfsr == (NV + 1) * LEN, $sformatf("lfsr steps %0d", n_lfsr))
    `CHECK(n_misr == NV * LEN, $sformatf("misr samples %0d", n_misr))
    `CHECK(n_upd == NV && n_ck == NV && n_cap == NV, $sformatf("capture pulses %0d %0d %0d", n_upd, n_ck, n_cap))
    `CHECK(n_check == 1, "one check")
    `CHECK(cycles == NV * (2 * LEN + 7) + 2 * LEN + 2, $sformatf("cycles to done %0d", cycles))
    repeat (3) @(negedge clk);
    `CHECK(done && !busy, "done holds")
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    `CHECK(!busy && !done, "idle after reset")
    run_once();
    run_once();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
