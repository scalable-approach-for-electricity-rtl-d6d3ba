// scan_ff_tb: drives the scan FF with the shift / update / ck / capture pulse
// sequence of a launch-on-capture test and checks each latch path: a shifted
// bit reaches scan_out after one shift clock, update moves it to data_out,
// data_out holds while shifting, ck takes data_in, capture moves data_out
// into the scan portion (seen at scan_out before the next shift).
`include "tb_macros.svh"
module scan_ff_tb;
  logic shift_ck = 0, capture = 0, update = 0, ck = 0, scan_in = 0, data_in = 0;
  logic scan_out, data_out;
  int checks = 0, failures = 0;

  scan_ff dut (.shift_ck, .capture, .update, .ck, .scan_in, .data_in, .scan_out, .data_out);

  task automatic pulse(ref logic s);
    #5 s = 1;
    #5 s = 0;
    #5;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic vec, resp, held;
    for (int i = 0; i < 200; i++) begin
      vec = 1'($urandom);
      resp = 1'($urandom);
      // shift in the test bit; data_out must hold meanwhile
      held = data_out;
      scan_in = vec;
      #5 shift_ck = 1;
      #5 shift_ck = 0;
      scan_in = ~vec;           // change after the falling edge: must not matter
      #5;
      if (i > 0) `CHECK(data_out == held, "data_out holds during shift")
      `CHECK(scan_out == vec, $sformatf("iter %0d: scan_out %b after shift, expected %b", i, scan_out, vec))
      // launch
      pulse(update);
      `CHECK(data_out == vec, $sformatf("iter %0d: data_out %b after update, expected %b", i, data_out, vec))
      // system capture
      data_in = resp;
      pulse(ck);
      `CHECK(data_out == resp, $sformatf("iter %0d: data_out %b after ck, expected %b", i, data_out, resp))
      data_in = ~resp;
      #5;
      `CHECK(data_out == resp, "data_out holds after ck falls")
      // scan capture
      pulse(capture);
      `CHECK(scan_out == resp, $sformatf("iter %0d: scan_out %b after capture, expected %b", i, scan_out, resp))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
