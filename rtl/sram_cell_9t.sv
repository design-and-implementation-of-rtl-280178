// sram_cell_9t: behavioural model of the dual-Vt 9T bit-cell of the
// row-controlled DVS FIFO (not synthesizable logic: it is a transistor cell).
//
// Function. Like the 10T cell it has a single-ended write port (MN1 with the
// feedback-cutting pMOS MP1) and a read buffer MN2/MN3/MN4 on node VR = ~VL,
// but no clamp transistor: the long-channel high-Vt buffer keeps bit-line
// leakage low instead. Its cell supply VDDC follows the sub-block mode
// (Table of operations: hold at VDDL, read at VDDH, write at VDDL):
//   VCS_OFF   data lost (VL modelled as 0), no access possible
//   VCS_LOW   data held, writes take T_WRITE_LOW, reads T_READ_LOW
//   VCS_HIGH  data held, writes take T_WRITE_HIGH, reads T_READ_HIGH
//   VCS_SHORT treated as VCS_HIGH (the switch model flags the error)
// With RWL high a cell holding VL = 0 discharges the floating RBL (rbl_pd = 1),
// so the sensed level equals the stored bit. The delays are model parameters;
// the document gives only their ordering (sub-threshold is slower).
module sram_cell_9t
  import fifo_pkg::*;
#(
  parameter realtime T_WRITE_LOW  = 4ns,
  parameter realtime T_WRITE_HIGH = 2ns,
  parameter realtime T_READ_LOW   = 8ns,
  parameter realtime T_READ_HIGH  = 2ns
) (
  input  vcs_e vcs,
  input  logic wwl,
  input  logic wbl,
  input  logic rwl,
  output logic rbl_pd,
  output logic vl
);
  timeunit 1ns; timeprecision 1ps;

  // Each process evaluates at time 0 and on every input change; a change
  // cancels an event still pending (gen counts evaluations).
  int unsigned wgen = 0, rgen = 0;

  initial begin
    vl = 1'b0;
    forever begin
      wgen++;
      if (vcs == VCS_OFF) vl = 1'b0;
      else if (wwl) begin
        automatic int unsigned g = wgen;
        automatic logic dv = wbl;
        automatic bit lo = (vcs == VCS_LOW);
        fork begin
          if (lo) #(T_WRITE_LOW); else #(T_WRITE_HIGH);
          if (g == wgen) vl = dv;
        end join_none
      end
      @(vcs, wwl, wbl);
    end
  end

  initial begin
    rbl_pd = 1'b0;
    forever begin
      rgen++;
      rbl_pd = 1'b0;
      if (rwl && !vl && vcs != VCS_OFF) begin
        automatic int unsigned g = rgen;
        automatic bit lo = (vcs == VCS_LOW);
        fork begin
          if (lo) #(T_READ_LOW); else #(T_READ_HIGH);
          if (g == rgen) rbl_pd = 1'b1;
        end join_none
      end
      @(rwl, vl, vcs);
    end
  end
endmodule
