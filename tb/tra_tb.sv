// tra_tb: the verdict is registered on check, passes only on an exact
// signature match, holds until the next start, and start clears it.
`include "tb_macros.svh"
module tra_tb;
  logic clk = 0, rst_n = 0, start = 0, check = 0;
  logic [3:0] signature, golden;
  logic valid, pass;
  int checks = 0, failures = 0;

  tra dut (.clk, .rst_n, .start, .check, .signature, .golden, .valid, .pass);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    signature = 0; golden = 0;
    repeat (2) @(posedge clk);
    #1 `CHECK(!valid && !pass, "reset clears the verdict")
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      signature = 4'(i % 16);
      golden    = (i < 32) ? 4'(i % 16) : (4'(i % 16) ^ 4'(1 << (i % 4)));
      start = 1; @(posedge clk); #1 start = 0;
      `CHECK(!valid && !pass, "start clears the verdict")
      @(posedge clk); #1;
      `CHECK(!valid, "no verdict before check")
      check = 1; @(posedge clk); #1 check = 0;
      `CHECK(valid, "valid after check")
      `CHECK(pass == (signature == golden), $sformatf("pass for sig %h golden %h", signature, golden))
      signature = ~signature;
      @(posedge clk); #1;
      `CHECK(valid && pass == (~signature == golden), "verdict holds after check")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
