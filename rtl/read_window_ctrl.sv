// read_window_ctrl: read window control of the FIFO.
//
// How it works. The read pulse RP is a register set on the rising edge of
// CLK_r when the chip is enabled (CEN = 0) and a read is requested (REN = 0).
// RP raises the selected read word line, the sense amplifiers and the replica
// read word line together. The replica cell stores the value that discharges
// its read bit line RBL_rp, through a fully loaded replica column, so it is
// the slowest bit line of the array. As soon as RBL_rp has fallen, R-ok rises:
// every data bit line has had at least as long to develop, the sense
// amplifiers latch, and R-ok resets the RP register. The word line is thus
// held just long enough, which cuts bit-line leakage and active power.
//
// Interface: rbl_rp is the replica read bit line (1 = still precharged),
// r_ok goes to the sense amplifiers, rp to the read pointer and replica.
// Timing: RP rises at the CLK_r edge and falls when the replica bit line is
// discharged; that must happen within one CLK_r period.
module read_window_ctrl (
  input  logic clk_r,
  input  logic cen,
  input  logic ren,
  input  logic rbl_rp,
  output logic rp,
  output logic r_ok
);
  timeunit 1ns; timeprecision 1ps;

  assign r_ok = rp & ~rbl_rp;

  always_ff @(posedge clk_r or posedge r_ok or posedge cen) begin
    if (cen)       rp <= 1'b0;
    else if (r_ok) rp <= 1'b0;
    else if (!ren) rp <= 1'b1;
  end
endmodule
