// write_window_ctrl: write window control with the worst-case detector.
//
// How it works. The write pulse WP is a register set on the rising edge of
// CLK_w when the chip is enabled (CEN = 0) and a write is requested (WEN = 0).
// WP opens the selected write word line, the write drivers and the replica
// column's write word line. The replica column writes 0 into one replica cell
// (through a fully loaded replica bit line, the slow case for write 0) and 1
// into another (the slow case for write 1, set by the access transistor). The
// worst-case detector waits for both: W_ok rises when both replica writes
// have completed, so the window always covers whichever of the two is slower
// at the present process, voltage and temperature. W_ok goes out through an
// inverter delay line for margin and comes back as w_ok_dly, which resets WP
// asynchronously.
//
// Interface: done0/done1 from the replica column, w_ok to the delay line,
// w_ok_dly back from it, wp to the write pointer, drivers and replica.
// Timing: WP rises at the CLK_w edge and falls one delay line after the
// slower replica write, which must be shorter than the CLK_w period.
module write_window_ctrl (
  input  logic clk_w,
  input  logic cen,
  input  logic wen,
  input  logic done0,
  input  logic done1,
  input  logic w_ok_dly,
  output logic wp,
  output logic w_ok
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge clk_w or posedge w_ok_dly or posedge cen) begin
    if (cen)           wp <= 1'b0;
    else if (w_ok_dly) wp <= 1'b0;
    else if (!wen)     wp <= 1'b1;
  end

  // Worst-case detector: both replica writes done.
  assign w_ok = wp & done0 & done1;
endmodule
