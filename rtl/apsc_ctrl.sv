// apsc_ctrl: adaptive power switch control system of the row-controlled DVS
// FIFO: one apsc_fsm per sub-block, driven from the two pointers.
//
// How it works. Data enter and leave a FIFO in order, so the moment each
// sub-block is needed is known in advance and no access ever waits for a
// supply to settle:
//  * when the write pointer starts writing the last word of sub-block k-1,
//    sub-block k is armed and moves from Floating to Low-power (VDDL) before
//    its first word is written;
//  * when the read pointer starts reading the last word of sub-block k-1 (or
//    reads sub-block k while it is still in Low-power), sub-block k moves
//    through Wait to Typical (VDDH), so at most two sub-blocks are at VDDH;
//  * one read clock after the read of its last word started, sub-block k
//    goes through Discharge back to Floating.
// The first sub-block starts in Low-power, all others in Floating.
//
// Clock domains. The arming comes from the write clock: it is a toggle bit
// per sub-block (arm_w) that a two-flop synchroniser carries into the read
// clock domain, where the state machines run; the machine acknowledges by
// flipping arm_r when it leaves Floating, so lp_req = arm_w ^ arm_r.
//
// Interface: addresses and active-low requests of the two pointers; per
// sub-block switch gates ps_l/ps_h (0 = on), dsch (1 = on) and mode.
// A sub-block armed while it is still Typical waits until it is Floating, so
// the writer must stay out of the sub-block being read.
module apsc_ctrl
  import fifo_pkg::*;
#(
  parameter int unsigned WORDS = 128,
  parameter int unsigned SUB   = 16,
  localparam int unsigned NSB  = WORDS / SUB,
  localparam int unsigned N    = $clog2(WORDS),
  localparam int unsigned S    = $clog2(SUB)
) (
  input  logic                 clk_w,
  input  logic                 clk_r,
  input  logic                 cen,
  input  logic                 wen,
  input  logic [N-1:0]         w_addr,
  input  logic                 ren,
  input  logic [N-1:0]         r_addr,
  output apsc_state_e          mode [NSB],
  output logic [NSB-1:0]       ps_l,
  output logic [NSB-1:0]       ps_h,
  output logic [NSB-1:0]       dsch
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned B = (NSB > 1) ? $clog2(NSB) : 1;

  function automatic logic [B-1:0] blk_of(input logic [N-1:0] a);
    return B'(a >> S);
  endfunction

  function automatic logic [B-1:0] next_blk(input logic [N-1:0] a);
    return B'((32'(blk_of(a)) + 1) % NSB);
  endfunction

  function automatic logic is_last(input logic [N-1:0] a);
    return (32'(a) % SUB) == (SUB - 1);
  endfunction

  // ---- write clock domain: arm the next sub-block ----
  logic [NSB-1:0] arm_w;
  always_ff @(posedge clk_w or posedge cen) begin
    if (cen) arm_w <= '0;
    else if (!wen && is_last(w_addr))
      arm_w[next_blk(w_addr)] <= ~arm_w[next_blk(w_addr)];
  end

  // ---- read clock domain ----
  logic [NSB-1:0] arm_s1, arm_s2, arm_r, lp_req, typ_req, rel_req;

  always_ff @(posedge clk_r or posedge cen) begin
    if (cen) begin
      arm_s1 <= '0;
      arm_s2 <= '0;
    end else begin
      arm_s1 <= arm_w;
      arm_s2 <= arm_s1;
    end
  end

  assign lp_req = arm_s2 ^ arm_r;

  always_ff @(posedge clk_r or posedge cen) begin
    if (cen) arm_r <= '0;
    else
      for (int k = 0; k < NSB; k++)
        if (lp_req[k] && mode[k] == APSC_FLOAT) arm_r[k] <= ~arm_r[k];
  end

  always_comb begin
    for (int k = 0; k < NSB; k++) begin
      typ_req[k] = !ren && ((blk_of(r_addr) == B'(k)) ||
                            (is_last(r_addr) && blk_of(r_addr) == B'((k + NSB - 1) % NSB)));
    end
  end

  // Release one read clock after the read of the last word started.
  always_ff @(posedge clk_r or posedge cen) begin
    if (cen) rel_req <= '0;
    else
      for (int k = 0; k < NSB; k++)
        rel_req[k] <= !ren && is_last(r_addr) && blk_of(r_addr) == B'(k);
  end

  for (genvar k = 0; k < NSB; k++) begin : g_sb
    apsc_fsm #(.RESET_LOW(k == 0)) u_fsm (
      .clk(clk_r), .cen, .lp_req(lp_req[k]), .typ_req(typ_req[k]),
      .rel_req(rel_req[k]), .mode(mode[k]), .ps_l(ps_l[k]), .ps_h(ps_h[k]),
      .dsch(dsch[k])
    );
  end
endmodule
