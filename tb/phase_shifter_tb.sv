// phase_shifter_tb: walks an x^4 + x^3 + 1 LFSR sequence (computed here) and
// checks, for the default instance (N=1, chains of 3) and for N=4 with chains
// of 2, that o is the 12-output XOR network and that prev/next/orig equal the
// values the same outputs had or will have whole vectors away:
// prev[q] = O(t-(q+1)n), next[q] = O(t+(N-q)n), orig[q] = O(t-q*n).
`include "tb_macros.svh"
module phase_shifter_tb;
  int checks = 0, failures = 0;

  logic [3:0] x;
  logic [11:0] o1, o4;
  logic [0:0][11:0] p1, n1, r1;
  logic [3:0][11:0] p4, n4, r4;

  phase_shifter dut1 (.x, .o(o1), .prev(p1), .next(n1), .orig(r1));
  phase_shifter #(.N(4), .LEN(2)) dut4 (.x, .o(o4), .prev(p4), .next(n4), .orig(r4));

  // O1..O12 written out bit by bit (X_k = s[k-1]).
  function automatic logic [11:0] ps_out(logic [3:0] s);
    logic x1, x2, x3, x4;
    {x4, x3, x2, x1} = s;
    return {x2 ^ x4, x4, x3 ^ x4, x1 ^ x4, x3, x2 ^ x3, x1 ^ x3 ^ x4, x2,
            x1 ^ x2, x1 ^ x2 ^ x3 ^ x4, x1, x1 ^ x3};
  endfunction

  logic [3:0] seq [0:199];

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seq[0] = 4'b0110;
    for (int t = 1; t < 200; t++) seq[t] = {seq[t-1][2:0], seq[t-1][3] ^ seq[t-1][2]};
    for (int t = 50; t < 150; t++) begin
      x = seq[t];
      #1;
      `CHECK(o1 == ps_out(seq[t]), $sformatf("t=%0d o %h expected %h", t, o1, ps_out(seq[t])))
      `CHECK(o4 == ps_out(seq[t]), "o of the N=4 instance")
      `CHECK(p1[0] == ps_out(seq[t-3]), $sformatf("t=%0d prev N=1", t))
      `CHECK(n1[0] == ps_out(seq[t+3]), $sformatf("t=%0d next N=1", t))
      `CHECK(r1[0] == ps_out(seq[t]),   $sformatf("t=%0d orig N=1", t))
      for (int q = 0; q < 4; q++) begin
        `CHECK(p4[q] == ps_out(seq[t-(q+1)*2]), $sformatf("t=%0d prev q=%0d N=4", t, q))
        `CHECK(n4[q] == ps_out(seq[t+(4-q)*2]), $sformatf("t=%0d next q=%0d N=4", t, q))
        `CHECK(r4[q] == ps_out(seq[t-q*2]),     $sformatf("t=%0d orig q=%0d N=4", t, q))
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
