// lbist_top_scal_tb: the end-to-end check of lbist_top_tb at the other group
// sizes of the scalable scheme, side by side: N = 2 ST vectors per group with
// chains of 3, N = 4 with chains of 5 and N = 8 with chains of 3. In each the
// vectors, the single toggle per bit and group, the signature, the cycle count
// and the fault / mismatch detection are checked, and the toggle reduction
// against the original vector sequence is printed (ideally 1 - 1/(N+1)).
module lbist_top_scal_tb;
  logic [2:0] fin;
  int c [3], f [3];

  lbist_top_check #(.N(2), .LEN(3), .NV(24)) u_n2 (.fin(fin[0]), .checks_o(c[0]), .failures_o(f[0]));
  lbist_top_check #(.N(4), .LEN(5), .NV(40)) u_n4 (.fin(fin[1]), .checks_o(c[1]), .failures_o(f[1]));
  lbist_top_check #(.N(8), .LEN(3), .NV(45)) u_n8 (.fin(fin[2]), .checks_o(c[2]), .failures_o(f[2]));

  initial begin
    int checks, failures;
    wait (&fin);
    #1;
    checks = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
