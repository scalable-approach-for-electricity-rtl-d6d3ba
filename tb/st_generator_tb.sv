// st_generator_tb: random candidate bits for N = 4 and for the default N = 1.
// With int1 low the scan input is the phase-shifter bit; with int1 high it is
// the bit of T_(i-1) at offset q when that equals the T_(i+N) bit, and the
// random bit R of offset q otherwise.
`include "tb_macros.svh"
module st_generator_tb;
  int checks = 0, failures = 0;

  logic       o_cur, int1, scan_in, r_used;
  logic [3:0] prev, next, rnd;
  logic [1:0] q;
  st_generator #(.N(4)) dut4 (.o_cur, .prev, .next, .rnd, .int1, .q, .scan_in, .r_used);

  logic       o1, i1, si1, ru1;
  logic [0:0] p1, n1, r1, q1;
  st_generator dut1 (.o_cur(o1), .prev(p1), .next(n1), .rnd(r1), .int1(i1), .q(q1),
                     .scan_in(si1), .r_used(ru1));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int i = 0; i < 1024; i++) begin
      {o_cur, int1} = 2'($urandom);
      prev = 4'($urandom); next = 4'($urandom); rnd = 4'($urandom); q = 2'($urandom);
      {o1, i1, p1, n1, r1} = 5'($urandom); q1 = 0;
      #1;
      if (!int1) exp = o_cur;
      else if (prev[q] == next[q]) exp = prev[q];
      else exp = rnd[q];
      `CHECK(scan_in == exp, $sformatf("N=4 q=%0d int1=%b: got %b expected %b", q, int1, scan_in, exp))
      `CHECK(r_used == (int1 && prev[q] != next[q]), "N=4 r_used")
      if (!i1) exp = o1;
      else exp = (p1 == n1) ? p1[0] : r1[0];
      `CHECK(si1 == exp, $sformatf("N=1: got %b expected %b", si1, exp))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
