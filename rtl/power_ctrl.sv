// power_ctrl: adaptive power control of the 16 Kb FIFO, one power gate per
// word.
//
// How it works. Because data leave a FIFO in the order they entered, which
// words hold data is known from the pointers alone. Each word has a
// two-state machine, cutoff or active; its output power_on[i] drives the
// power MOS of the word's cells. All words start in cutoff. A word becomes
// active when a write to it starts (its supply is charged for the write) and
// stays active until its data have been read out, then returns to cutoff,
// so empty words leak nothing.
//
// The write and read sides run on different clocks, so the state of word i
// is kept as two toggle bits: set_t[i] flips when a write of word i starts
// (rising CLK_w edge with WEN = 0), clr_t[i] flips when a read of word i ends
// (falling edge of the read pulse RP). Between those events exactly one of
// them has flipped, so power_on[i] = set_t[i] ^ clr_t[i] is the state of the
// machine. CEN = 1 returns every word to cutoff.
//
// Interface: w_addr/r_addr are the pointer addresses, wen the write request
// (active low), rp the read window pulse. The cutoff/active machine follows
// the document; the two-toggle encoding is this design's choice.
module power_ctrl #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned N    = $clog2(WORDS)
) (
  input  logic             clk_w,
  input  logic             cen,
  input  logic             wen,
  input  logic [N-1:0]     w_addr,
  input  logic             rp,
  input  logic [N-1:0]     r_addr,
  output logic [WORDS-1:0] power_on
);
  timeunit 1ns; timeprecision 1ps;

  logic [WORDS-1:0] set_t, clr_t;

  always_ff @(posedge clk_w or posedge cen) begin
    if (cen)       set_t <= '0;
    else if (!wen) set_t[w_addr] <= ~set_t[w_addr];
  end

  always_ff @(negedge rp or posedge cen) begin
    if (cen) clr_t <= '0;
    else     clr_t[r_addr] <= ~clr_t[r_addr];
  end

  assign power_on = set_t ^ clr_t;
endmodule
