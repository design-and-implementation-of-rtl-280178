// dvs_fifo2k: 2 Kb (128 words x 16 bits) built-in row-controlled dynamic
// voltage scaling (DVS) FIFO with 9T cells.
//
// Instead of switching the supply of the whole FIFO, the array is cut into
// sub-blocks of SUB = 16 words, each with its own power switches, and the
// supply of each sub-block follows the pointers: Floating (cut off) when it
// holds nothing, Low-power (VDDL = 0.3 V, sub-threshold) while it is written
// and while it holds data, Typical (VDDH = 0.5 V) only while it is read. The
// write side (pointer, drivers, window control) runs at VDDL, the read side
// at VDDH, so writes and reads proceed at the same time on their own clocks.
// Because a FIFO's access order is fixed, every supply change is started a
// word ahead and no access stalls; only a small sub-block capacitance is
// charged at each switch.
//
// Structure: the same pointer, window-control, replica, sense-amplifier and
// array blocks as the 16 Kb FIFO (the replica column uses 9T cells), plus
// apsc_ctrl (one apsc_fsm per sub-block) and one power_switch per sub-block
// whose VCS decides which words retain data. The VDDL generator (a switched
// capacitor DC-DC converter) is outside this block.
//
// Pins: as the 16 Kb FIFO (clk_w, clk_r, cen, wen, ren, d, q; controls
// active low), plus vcs, the present supply of each sub-block, for
// observation. Timing: D is captured at the CLK_w edge that starts a write;
// Q updates within the CLK_r cycle that starts a read. No full/empty flags:
// the producer must stay out of the sub-block being read.
module dvs_fifo2k
  import fifo_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned WORDS = 128,
  parameter int unsigned SUB   = 16,
  localparam int unsigned NSB  = WORDS / SUB,
  localparam int unsigned N    = $clog2(WORDS),
  parameter realtime T_WBL0    = 20ns,
  parameter realtime T_CELL_W0 = 8ns,
  parameter realtime T_CELL_W1 = 20ns,
  parameter realtime T_CELL_RD = 5ns,
  parameter realtime T_RBL     = 20ns,
  parameter realtime T_DLY     = 5ns
) (
  input  logic              clk_w,
  input  logic              clk_r,
  input  logic              cen,
  input  logic              wen,
  input  logic              ren,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q,
  output vcs_e              vcs [NSB]
);
  timeunit 1ns; timeprecision 1ps;

  logic wp, rp, w_ok, w_ok_dly, r_ok, done0, done1, rbl_rp;
  logic [N-1:0] w_addr, r_addr;
  logic [WORDS-1:0] wwl, rwl, wsel_unused, rsel_unused, retain;
  logic [DATA_W-1:0] wbl, rbl;
  logic [NSB-1:0] ps_l, ps_h, dsch;
  apsc_state_e mode [NSB];

  always_ff @(posedge clk_w or posedge cen) begin
    if (cen)       wbl <= '0;
    else if (!wen) wbl <= d;
  end

  write_window_ctrl u_wctl (
    .clk_w, .cen, .wen, .done0, .done1, .w_ok_dly, .wp, .w_ok
  );
  delay_line #(.DELAY(T_DLY)) u_dly (.a(w_ok), .y(w_ok_dly));

  read_window_ctrl u_rctl (.clk_r, .cen, .ren, .rbl_rp, .rp, .r_ok);

  replica_column #(
    .CELL_9T(1'b1), .T_WBL0(T_WBL0), .T_CELL_W0(T_CELL_W0),
    .T_CELL_W1(T_CELL_W1), .T_CELL_RD(T_CELL_RD), .T_RBL(T_RBL)
  ) u_rep (.wp, .rp, .done0, .done1, .rbl_rp);

  fifo_pointer #(.WORDS(WORDS)) u_wptr (
    .cen, .pulse(wp), .addr(w_addr), .sel(wsel_unused), .wl(wwl)
  );
  fifo_pointer #(.WORDS(WORDS)) u_rptr (
    .cen, .pulse(rp), .addr(r_addr), .sel(rsel_unused), .wl(rwl)
  );

  apsc_ctrl #(.WORDS(WORDS), .SUB(SUB)) u_apsc (
    .clk_w, .clk_r, .cen, .wen, .w_addr, .ren, .r_addr,
    .mode, .ps_l, .ps_h, .dsch
  );

  for (genvar k = 0; k < NSB; k++) begin : g_sw
    power_switch u_sw (.ps_h(ps_h[k]), .ps_l(ps_l[k]), .dsch(dsch[k]), .vcs(vcs[k]));
    assign retain[k*SUB +: SUB] = {SUB{vcs[k] != VCS_OFF}};
  end

  fifo_array #(.WORDS(WORDS), .DATA_W(DATA_W)) u_array (
    .wwl, .wbl, .rwl, .retain, .rbl
  );

  sense_amp_bank #(.DATA_W(DATA_W)) u_sa (.cen, .r_ok, .rbl, .q);

  // A write must only reach a sub-block whose cells are supplied: its
  // controller is in Low-power, Wait or Typical for the whole window.
  localparam int unsigned B = (NSB > 1) ? $clog2(NSB) : 1;
  logic [B-1:0] w_blk;
  assign w_blk = B'(w_addr / N'(SUB));
  always_comb
    if (wp && !cen)
      a_write_powered: assert (mode[w_blk] inside {APSC_LOW, APSC_WAIT, APSC_TYP});
endmodule
