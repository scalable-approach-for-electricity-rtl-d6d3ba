// space_compactor_tb: random chain outputs; each of the 4 outputs must be the
// XOR of chains k, k+4 and k+8 (12 chains onto 4 MISR inputs).
`include "tb_macros.svh"
module space_compactor_tb;
  logic [11:0] chain_out;
  logic [3:0]  comp_out;
  int checks = 0, failures = 0;

  space_compactor dut (.chain_out, .comp_out);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp;
    for (int i = 0; i < 300; i++) begin
      chain_out = (i < 12) ? 12'(1 << i) : 12'($urandom);
      #1;
      for (int k = 0; k < 4; k++) exp[k] = chain_out[k] ^ chain_out[k+4] ^ chain_out[k+8];
      `CHECK(comp_out == exp, $sformatf("in %h: out %b expected %b", chain_out, comp_out, exp))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
