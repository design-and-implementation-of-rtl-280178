// sram_cell_10t: behavioural model of the 10T dual-port near/sub-threshold
// bit-cell (not synthesizable logic: it is a transistor-level cell).
//
// Function. The cell holds one bit on node VL. Writing is single-ended: while
// WWL is high the access nMOS MN1 connects VL to the write bit line WBL and the
// pass pMOS MP1 opens the feedback path from inverter B, so VL simply follows
// WBL after the write delay T_WRITE. Reading goes through the decoupled buffer
// MN2/MN3/MN4 whose gate is VR = ~VL: with RWL high a cell holding VL = 0
// discharges the precharged read bit line RBL after T_READ, a cell holding
// VL = 1 leaves it high, so the sensed RBL level equals the stored bit. With RWL
// low MP2 clamps the buffer node high, so an unselected cell never pulls RBL
// down whatever it holds (data-independent bit-line leakage).
//
// Interface. vcs_on is the cell supply from the word's power gate: when it is
// low the stored bit is lost (modelled as VL returning to 0 at once). rbl_pd = 1 means
// this cell is pulling RBL down. vl exposes the storage node.
//
// The topology and the read polarity follow the cell schematic; the two delays
// are free parameters of this model.
module sram_cell_10t #(
  parameter realtime T_WRITE = 2ns,
  parameter realtime T_READ  = 2ns
) (
  input  logic vcs_on,
  input  logic wwl,
  input  logic wbl,
  input  logic rwl,
  output logic rbl_pd,
  output logic vl
);
  timeunit 1ns; timeprecision 1ps;

  // Each process evaluates at time 0 and on every input change. A change of
  // the inputs cancels an event still pending (gen counts evaluations), so a
  // word line that closes too early leaves the cell unwritten and an
  // unselected cell never pulls the bit line.
  int unsigned wgen = 0, rgen = 0;

  initial begin
    vl = 1'b0;
    forever begin
      wgen++;
      if (!vcs_on) vl = 1'b0;
      else if (wwl) begin
        automatic int unsigned g = wgen;
        automatic logic dv = wbl;
        fork begin #(T_WRITE); if (g == wgen) vl = dv; end join_none
      end
      @(vcs_on, wwl, wbl);
    end
  end

  initial begin
    rbl_pd = 1'b0;
    forever begin
      rgen++;
      rbl_pd = 1'b0;
      if (rwl && !vl) begin
        automatic int unsigned g = rgen;
        fork begin #(T_READ); if (g == rgen) rbl_pd = 1'b1; end join_none
      end
      @(rwl, vl);
    end
  end
endmodule
