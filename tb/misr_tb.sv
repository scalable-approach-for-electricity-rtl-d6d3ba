// misr_tb: random parallel inputs with random enables; the signature is
// checked every cycle against a bit-level model of the x^4 + x + 1 MISR
// (s0' = s3^d0, s1' = s0^s3^d1, s2' = s1^d2, s3' = s2^d3), and clear is checked.
`include "tb_macros.svh"
module misr_tb;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [3:0] d, sig;
  int checks = 0, failures = 0;

  misr dut (.clk, .rst_n, .clear, .en, .d, .sig);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] m;
    d = 0;
    repeat (2) @(posedge clk);
    #1 `CHECK(sig == 0, "reset clears the signature")
    rst_n = 1;
    m = 0;
    for (int i = 0; i < 400; i++) begin
      d = 4'($urandom);
      en = ($urandom % 4) != 0;
      clear = (i == 200);
      @(posedge clk); #1;
      if (clear) m = 0;
      else if (en) m = {m[2] ^ d[3], m[1] ^ d[2], m[0] ^ m[3] ^ d[1], m[3] ^ d[0]};
      `CHECK(sig == m, $sformatf("cycle %0d: sig %b expected %b", i, sig, m))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
