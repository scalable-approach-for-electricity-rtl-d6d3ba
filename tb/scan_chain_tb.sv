// scan_chain_tb: a chain of 5 scan FFs (and one of the default 3). A random
// vector is shifted in (first bit ends in SFF1), launched with update and
// checked on data_out; a random response is taken with ck and capture and must
// leave scan_out SFF1 first while the next vector goes in; data_out must not
// change during shifting.
`include "tb_macros.svh"
module scan_chain_tb;
  localparam int L = 5;
  logic shift_ck = 0, capture = 0, update = 0, ck = 0, scan_in = 0;
  logic scan_out, so3;
  logic [L-1:0] data_in = '0, data_out;
  logic [2:0] di3 = '0, do3;
  int checks = 0, failures = 0;

  scan_chain #(.LEN(L)) dut (.shift_ck, .capture, .update, .ck, .scan_in, .scan_out,
                             .data_in, .data_out);
  scan_chain dut3 (.shift_ck, .capture, .update, .ck, .scan_in, .scan_out(so3),
                   .data_in(di3), .data_out(do3));

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] vec, resp, held;
    logic [2:0] resp3;
    resp = '0;
    resp3 = '0;
    for (int it = 0; it < 60; it++) begin
      vec = L'($urandom);
      held = data_out;
      // shift: bit c goes in at cycle c and ends in SFF(c+1)
      for (int c = 0; c < L; c++) begin
        if (it > 0) begin
          `CHECK(scan_out == resp[c], $sformatf("it %0d: unload bit %0d is %b, expected %b", it, c, scan_out, resp[c]))
          if (c < 3) `CHECK(so3 == resp3[c], "default chain unload")
        end
        scan_in = vec[c];
        #5 shift_ck = 1;
        #5 shift_ck = 0;
        #5;
        if (it > 0) `CHECK(data_out == held, "data_out holds during shift")
      end
      #5 update = 1; #5 update = 0; #5;
      `CHECK(data_out == vec, $sformatf("it %0d: data_out %b expected %b", it, data_out, vec))
      `CHECK(do3 == vec[4:2], $sformatf("it %0d: default chain data_out %b", it, do3))
      resp = L'($urandom);
      resp3 = 3'($urandom);
      data_in = resp;
      di3 = resp3;
      #5 ck = 1; #5 ck = 0; #5;
      `CHECK(data_out == resp, "data_out takes the response on ck")
      #5 capture = 1; #5 capture = 0; #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
