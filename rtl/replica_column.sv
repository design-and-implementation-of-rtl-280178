// replica_column: behavioural model of the replica column that times the
// read and write windows (analog timing, not synthesizable logic).
//
// How it works. The column holds three dummy cells of the array's own type
// (10T, or 9T when CELL_9T = 1) on bit lines as long as a data column:
//  * write-0 replica: while WP is high its write driver discharges WBL_rp0
//    through the full bit-line load (T_WBL0, grows with cells per bit line)
//    and the cell then flips to 0. done0 = the cell holds 0.
//  * write-1 replica: WBL_rp1 is held high, so the delay is that of the
//    access transistor alone (the cell's T_CELL_W1). done1 = the cell holds 1.
//  * read replica: its data is fixed to the value that discharges the read
//    bit line; while RP is high RBL_rp falls after the cell's read delay plus
//    the bit-line load T_RBL. While RP is low RBL_rp is precharged high.
// Between write windows the replica write drivers drive the opposite values,
// so each window starts from the state the replica has to flip.
//
// Interface: wp/rp from the window controllers; done0, done1 to the write
// worst-case detector; rbl_rp to the read window control. All delays are
// parameters of this model; the document shows only that the write-0 delay
// grows with bit-line length while the write-1 delay does not.
module replica_column
  import fifo_pkg::*;
#(
  parameter bit      CELL_9T   = 1'b0,
  parameter realtime T_WBL0    = 20ns,
  parameter realtime T_CELL_W0 = 5ns,
  parameter realtime T_CELL_W1 = 15ns,
  parameter realtime T_CELL_RD = 5ns,
  parameter realtime T_RBL     = 20ns
) (
  input  logic wp,
  input  logic rp,
  output logic done0,
  output logic done1,
  output logic rbl_rp
);
  timeunit 1ns; timeprecision 1ps;

  // Replica write bit lines. A change of WP cancels a discharge still
  // pending (wgen counts the changes).
  logic wbl_rp0, wbl_rp1;
  int unsigned wgen = 0, rgen = 0;
  initial begin
    forever begin
      wgen++;
      wbl_rp0 = 1'b1;                   // restore: precharged high
      if (wp) begin                     // discharge through the loaded line
        automatic int unsigned g = wgen;
        fork begin #(T_WBL0); if (g == wgen) wbl_rp0 = 1'b0; end join_none
      end
      @(wp);
    end
  end
  assign wbl_rp1 = wp;                  // held high during the window

  logic vl0, vl1, vl_rd_unused, pd0_unused, pd1_unused, pd_rd;

  if (CELL_9T) begin : g_9t
    sram_cell_9t #(.T_WRITE_LOW(T_CELL_W0), .T_WRITE_HIGH(T_CELL_W0))
      u_w0 (.vcs(VCS_LOW), .wwl(1'b1), .wbl(wbl_rp0), .rwl(1'b0), .rbl_pd(pd0_unused), .vl(vl0));
    sram_cell_9t #(.T_WRITE_LOW(T_CELL_W1), .T_WRITE_HIGH(T_CELL_W1))
      u_w1 (.vcs(VCS_LOW), .wwl(1'b1), .wbl(wbl_rp1), .rwl(1'b0), .rbl_pd(pd1_unused), .vl(vl1));
    sram_cell_9t #(.T_READ_LOW(T_CELL_RD), .T_READ_HIGH(T_CELL_RD))
      u_rd (.vcs(VCS_HIGH), .wwl(1'b1), .wbl(1'b0), .rwl(rp), .rbl_pd(pd_rd), .vl(vl_rd_unused));
  end else begin : g_10t
    sram_cell_10t #(.T_WRITE(T_CELL_W0))
      u_w0 (.vcs_on(1'b1), .wwl(1'b1), .wbl(wbl_rp0), .rwl(1'b0), .rbl_pd(pd0_unused), .vl(vl0));
    sram_cell_10t #(.T_WRITE(T_CELL_W1))
      u_w1 (.vcs_on(1'b1), .wwl(1'b1), .wbl(wbl_rp1), .rwl(1'b0), .rbl_pd(pd1_unused), .vl(vl1));
    sram_cell_10t #(.T_READ(T_CELL_RD))
      u_rd (.vcs_on(1'b1), .wwl(1'b1), .wbl(1'b0), .rwl(rp), .rbl_pd(pd_rd), .vl(vl_rd_unused));
  end

  assign done0 = wp & ~vl0;
  assign done1 = wp &  vl1;

  initial begin
    forever begin
      rgen++;
      rbl_rp = 1'b1;                    // precharged, or still discharging
      if (rp && pd_rd) begin
        automatic int unsigned g = rgen;
        fork begin #(T_RBL); if (g == rgen) rbl_rp = 1'b0; end join_none
      end
      @(pd_rd, rp);
    end
  end
endmodule
