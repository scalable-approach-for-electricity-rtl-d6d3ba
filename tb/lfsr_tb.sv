// lfsr_tb: checks the 4-bit pattern generator against the recurrence of
// x^4 + x^3 + 1 (X1 <= X3 ^ X4, X2 <= X1, X3 <= X2, X4 <= X3), its period of
// 15 non-zero states, the hold when en is low and the reset and load of the seed.
`include "tb_macros.svh"
module lfsr_tb;
  logic clk = 0, rst_n = 0, en = 0, load = 0;
  logic [3:0] state;
  int checks = 0, failures = 0;

  lfsr dut (.clk, .rst_n, .load, .en, .state);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] model;
    logic [15:0] seen;
    repeat (2) @(posedge clk);
    #1 `CHECK(state == 4'b0001, "reset state is the seed")
    rst_n = 1;
    model = 4'b0001;
    seen = '0;
    for (int i = 0; i < 40; i++) begin
      en = (i % 5) != 3;
      @(posedge clk); #1;
      if (en) model = {model[2:0], model[3] ^ model[2]};
      `CHECK(state == model, $sformatf("step %0d: state %b, expected %b", i, state, model))
    end
    // Period: 15 distinct non-zero states, then back to the start.
    en = 1;
    seen = '0;
    for (int i = 0; i < 15; i++) begin
      `CHECK(!seen[state] && state != 0, $sformatf("state %b repeats early", state))
      seen[state] = 1'b1;
      @(posedge clk); #1;
    end
    `CHECK(seen == 16'hFFFE, "all 15 non-zero states visited")
    // load reseeds, and wins over en
    load = 1; @(posedge clk); #1 load = 0;
    `CHECK(state == 4'b0001, "load restores the seed")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
