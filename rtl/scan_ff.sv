// scan_ff: latch-based scan flip-flop with separate scan and system portions.
//
// Scan portion (master-slave LA/LB):
//   LA is transparent to scan_in while shift_ck is high, and to data_out
//      while capture is high (it samples one of its two data lines,
//      depending on which of its clocks is active);
//   LB is transparent to LA while shift_ck is low; its output is scan_out.
// System portion (master-slave PH2/PH1):
//   PH2 is transparent to data_in while ck is low;
//   PH1 is transparent to LB while update is high and to PH2 while ck is
//      high; its output is data_out, the value the logic under test sees.
// So data_in is taken on the rising edge of ck, a pulse on update copies the
// shifted-in bit to data_out (the launch), and a pulse on capture moves the
// captured response into the scan portion. During a shift phase update and
// ck stay low, so data_out does not move while new bits are shifted in.
// The structure follows the design's scan FF; it is written as latches on
// purpose, so the latch warnings of synthesis for this module are expected.
// Rules: shift_ck and capture never high together, nor update and ck (the
// BIST controller asserts that its pulses never overlap).
// LA -> LB -> PH1 -> LA forms a loop through latches that tools report as
// combinational; it is never transparent end to end, because shift_ck low
// (LB open), update (PH1 from LB) and capture (LA from PH1) are separate
// pulses, and the loop is part of the flip-flop's structure.
module scan_ff (
  input  logic shift_ck,
  input  logic capture,
  input  logic update,
  input  logic ck,
  input  logic scan_in,
  input  logic data_in,
  output logic scan_out,
  output logic data_out
);

  logic la, lb, ph2, ph1;

  always_latch begin
    if (shift_ck)     la = scan_in;
    else if (capture) la = ph1;
  end

  always_latch begin
    if (!shift_ck) lb = la;
  end

  always_latch begin
    if (!ck) ph2 = data_in;
  end

  always_latch begin
    if (update)  ph1 = lb;
    else if (ck) ph1 = ph2;
  end

  assign scan_out = lb;
  assign data_out = ph1;

endmodule
