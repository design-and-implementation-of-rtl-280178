// fifo16k: 16 Kb (1024 words x 16 bits) dual-clock SRAM-based FIFO for a
// wireless body-area-network sensor node, built for 0.5 V near-threshold
// operation.
//
// The FIFO buffers sensor samples written slowly (50 kHz write clock, 16-bit
// ECG-class samples) and read out in bursts at 625 kHz. Power is cut in four
// ways: (1) 10T dual-port cells with single-ended bit lines; (2) adaptive
// power control that gates the supply of every word that holds no data;
// (3) counter-based pointers instead of ring shift registers; (4) replica
// read/write window control that opens a word line only as long as the
// slowest replica cell needs at the present PVT condition.
//
// Structure: write side = write_window_ctrl (WP) + replica write cells +
// delay_line, fifo_pointer (write counter and WWL decoder), input data
// register driving the write bit lines. Read side = read_window_ctrl (RP) +
// replica read cell, fifo_pointer (read counter and RWL decoder),
// sense_amp_bank. Shared: fifo_array and power_ctrl.
//
// Pins (all control active low as in the document's pin list):
//   clk_w, clk_r  write / read clocks, unrelated
//   cen           1 = chip disabled: pointers, power states, Q cleared
//   wen, ren      0 = write / read on the next rising edge of its clock
//   d, q          16-bit data in / out, bit 0 = LSB
// Timing: D is captured on the CLK_w edge that starts a write; Q updates
// within the CLK_r cycle that starts a read. There are no full or empty
// outputs (the document's pin list has none): the producer and consumer must
// keep reads behind writes and at most WORDS words apart. The input data
// register is this design's choice; the document does not say when D is taken.
module fifo16k #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned WORDS = 1024,
  localparam int unsigned N    = $clog2(WORDS),
  parameter realtime T_WBL0    = 20ns,
  parameter realtime T_CELL_W0 = 5ns,
  parameter realtime T_CELL_W1 = 15ns,
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
  output logic [DATA_W-1:0] q
);
  timeunit 1ns; timeprecision 1ps;

  logic wp, rp, w_ok, w_ok_dly, r_ok, done0, done1, rbl_rp;
  logic [N-1:0] w_addr, r_addr;
  logic [WORDS-1:0] wwl, rwl, wsel_unused, rsel_unused, power_on;
  logic [DATA_W-1:0] wbl, rbl;

  // Write data register feeding the write drivers.
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
    .CELL_9T(1'b0), .T_WBL0(T_WBL0), .T_CELL_W0(T_CELL_W0),
    .T_CELL_W1(T_CELL_W1), .T_CELL_RD(T_CELL_RD), .T_RBL(T_RBL)
  ) u_rep (.wp, .rp, .done0, .done1, .rbl_rp);

  fifo_pointer #(.WORDS(WORDS)) u_wptr (
    .cen, .pulse(wp), .addr(w_addr), .sel(wsel_unused), .wl(wwl)
  );
  fifo_pointer #(.WORDS(WORDS)) u_rptr (
    .cen, .pulse(rp), .addr(r_addr), .sel(rsel_unused), .wl(rwl)
  );

  power_ctrl #(.WORDS(WORDS)) u_pwr (
    .clk_w, .cen, .wen, .w_addr, .rp, .r_addr, .power_on
  );

  fifo_array #(.WORDS(WORDS), .DATA_W(DATA_W)) u_array (
    .wwl, .wbl, .rwl, .retain(power_on), .rbl
  );

  sense_amp_bank #(.DATA_W(DATA_W)) u_sa (.cen, .r_ok, .rbl, .q);
endmodule
