// wban_fifo_top: the two SRAM-based FIFO memories for a wireless
// body-area-network sensor node, side by side.
//
//  a_*  fifo16k    - 16 Kb (1024 x 16) 0.5 V FIFO with 10T cells, per-word
//                    adaptive power gating, counter-based pointers and
//                    replica read/write window control.
//  b_*  dvs_fifo2k - 2 Kb (128 x 16) FIFO with 9T cells whose 16-word
//                    sub-blocks switch between cut-off, 0.3 V and 0.5 V as
//                    the pointers approach them.
// The two memories share nothing; each has its own clocks and controls
// (active low wen/ren, cen = 1 disables) and 16-bit data ports. b_vcs reports
// the supply condition of each sub-block of the DVS FIFO. All parameters
// default to the sizes of the two memories.
module wban_fifo_top
  import fifo_pkg::*;
#(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned A_WORDS = 1024,
  parameter int unsigned B_WORDS = 128,
  parameter int unsigned B_SUB   = 16,
  localparam int unsigned B_NSB  = B_WORDS / B_SUB
) (
  input  logic              a_clk_w,
  input  logic              a_clk_r,
  input  logic              a_cen,
  input  logic              a_wen,
  input  logic              a_ren,
  input  logic [DATA_W-1:0] a_d,
  output logic [DATA_W-1:0] a_q,

  input  logic              b_clk_w,
  input  logic              b_clk_r,
  input  logic              b_cen,
  input  logic              b_wen,
  input  logic              b_ren,
  input  logic [DATA_W-1:0] b_d,
  output logic [DATA_W-1:0] b_q,
  output vcs_e              b_vcs [B_NSB]
);
  timeunit 1ns; timeprecision 1ps;

  fifo16k #(.DATA_W(DATA_W), .WORDS(A_WORDS)) u_fifo16k (
    .clk_w(a_clk_w), .clk_r(a_clk_r), .cen(a_cen), .wen(a_wen), .ren(a_ren),
    .d(a_d), .q(a_q)
  );

  dvs_fifo2k #(.DATA_W(DATA_W), .WORDS(B_WORDS), .SUB(B_SUB)) u_dvs_fifo2k (
    .clk_w(b_clk_w), .clk_r(b_clk_r), .cen(b_cen), .wen(b_wen), .ren(b_ren),
    .d(b_d), .q(b_q), .vcs(b_vcs)
  );
endmodule
