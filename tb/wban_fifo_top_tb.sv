// wban_fifo_top_tb: end-to-end test of both FIFOs at their full sizes and
// default parameters: the 16 Kb FIFO (1024 x 16, 50 kHz write, 625 kHz read)
// and the 2 Kb DVS FIFO (128 x 16, 33 us write, 1.6 us read), run at the
// same time from independent, unrelated clocks.
//
// For each FIFO the testbench plays the sensor node: random sensor samples
// are written at the slow rate and read out in bursts at the fast rate,
// with fill levels up to the whole array, so both pointers wrap. Data are
// checked against a scoreboard, one read per read clock.
// Every mechanism of the document is counted and the test fails if one of
// them never happens:
//  16 Kb: per-word power on at write start and cut off after read-out (with
//         loss of the word's contents), replica worst-case write detection
//         (W_ok from both replica cells), the delay line ending the write
//         pulse, replica read R-ok ending the read pulse, sense amplifier
//         capture, pointer wrap-around of the decoder word lines;
//  2 Kb:  Floating -> Low-power arming by the write of the previous
//         sub-block's last word, Low-power -> Wait -> Typical wake-up for
//         reading, Typical -> Discharge -> Floating release after read-out,
//         writes at VDDL, reads at VDDH, pointer wrap-around.
module wban_fifo_top_tb;
  import fifo_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int      DATA_W = 16;

  localparam int      AW   = 1024;
  localparam int      BW   = 128;
  localparam int      BSUB = 16;
  localparam int      BNSB = BW / BSUB;
  localparam realtime TA_W = 20000ns;
  localparam realtime TA_R = 1600ns;
  localparam realtime TB_W = 33000ns;
  localparam realtime TB_R = 1600ns;

  int checks = 0, failures = 0;
  logic a_clk_w = 0, a_clk_r = 0, a_cen, a_wen, a_ren;
  logic b_clk_w = 0, b_clk_r = 0, b_cen, b_wen, b_ren;
  logic [DATA_W-1:0] a_d, a_q, b_d, b_q;
  vcs_e b_vcs [BNSB];

  wban_fifo_top dut (.*);

  initial begin #7000ns; forever #(TA_W / 2) a_clk_w = ~a_clk_w; end
  initial begin #300ns;  forever #(TA_R / 2) a_clk_r = ~a_clk_r; end
  initial begin #11000ns; forever #(TB_W / 2) b_clk_w = ~b_clk_w; end
  initial begin #1100ns; forever #(TB_R / 2) b_clk_r = ~b_clk_r; end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #400ms failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------------
  // 16 Kb FIFO
  // ------------------------------------------------------------------
  logic [DATA_W-1:0] a_sb [$];
  logic [DATA_W-1:0] a_exp;
  int a_iw, a_dw, a_dr, a_wrap_w, a_wrap_r;
  bit a_rd_on, a_wr_on, a_pend;
  int n_pwr_on, n_pwr_off, n_wok, n_dly_end, n_rok, n_sa, n_lost;

  always @(negedge a_clk_w)
    if (!a_cen && a_wr_on && a_iw - a_dr < AW && $urandom_range(9) != 0) begin
      a_wen = 0; a_d = DATA_W'($urandom);
    end else a_wen = 1;
  always @(posedge a_clk_w) if (!a_cen && !a_wen) begin
    a_iw++; a_sb.push_back(a_d);
    #1ns;
    if (dut.u_fifo16k.power_on[dut.u_fifo16k.w_addr]) n_pwr_on++;
  end
  always @(negedge a_clk_r)
    a_ren = !(!a_cen && a_rd_on && a_dw > a_dr);
  always @(posedge a_clk_r) begin
    if (a_pend) chk(a_q == a_exp, "16Kb read data");
    a_pend = 0;
    if (!a_cen && !a_ren) begin a_exp = a_sb.pop_front(); a_pend = 1; a_dr++; end
  end
  always @(posedge dut.u_fifo16k.w_ok) if (!a_cen) n_wok++;
  always @(negedge dut.u_fifo16k.wp) if (!a_cen) begin
    a_dw++;
    if (dut.u_fifo16k.w_ok_dly) n_dly_end++;
  end
  always @(posedge dut.u_fifo16k.wp) if (!a_cen && dut.u_fifo16k.w_addr == AW - 1) a_wrap_w++;
  always @(posedge dut.u_fifo16k.rp) if (!a_cen && dut.u_fifo16k.r_addr == AW - 1) a_wrap_r++;
  always @(posedge dut.u_fifo16k.r_ok) if (!a_cen) n_rok++;
  always @(negedge dut.u_fifo16k.rp) if (!a_cen) begin
    automatic int a = int'(dut.u_fifo16k.r_addr);
    if (a_exp == dut.u_fifo16k.q) n_sa++;
    #1ns;
    if (!dut.u_fifo16k.power_on[a]) n_pwr_off++;
    if (dut.u_fifo16k.u_array.mem[a] == '0) n_lost++;
  end

  // ------------------------------------------------------------------
  // 2 Kb DVS FIFO
  // ------------------------------------------------------------------
  logic [DATA_W-1:0] b_sb [$];
  logic [DATA_W-1:0] b_exp;
  int b_iw, b_dw, b_dr, b_wrap, b_consec;
  bit b_rd_on, b_wr_on, b_pend;
  int n_fl_lo, n_lo_wt, n_wt_ty, n_ty_ds, n_ds_fl, n_wr_low, n_rd_high;
  apsc_state_e prev [BNSB];

  always @(negedge b_clk_w)
    if (!b_cen && b_wr_on && b_iw - b_dr < BW - BSUB && $urandom_range(7) != 0) begin
      b_wen = 0; b_d = DATA_W'($urandom);
    end else b_wen = 1;
  always @(posedge b_clk_w) if (!b_cen && !b_wen) begin b_iw++; b_sb.push_back(b_d); end
  always @(negedge b_clk_r)
    b_ren = !(!b_cen && b_rd_on && b_dw > b_dr);
  always @(posedge b_clk_r) begin
    if (b_pend) chk(b_q == b_exp, "2Kb read data");
    b_pend = 0;
    if (!b_cen && !b_ren) begin b_exp = b_sb.pop_front(); b_pend = 1; b_dr++; b_consec++; end
    else b_consec = 0;
  end
  always @(negedge dut.u_dvs_fifo2k.wp) if (!b_cen) b_dw++;
  always @(posedge dut.u_dvs_fifo2k.wp) if (!b_cen) begin
    automatic int blk = int'(dut.u_dvs_fifo2k.w_addr) / BSUB;
    chk(b_vcs[blk] inside {VCS_LOW, VCS_HIGH}, "2Kb write to a supplied sub-block");
    if (b_vcs[blk] == VCS_LOW) n_wr_low++;
    if (dut.u_dvs_fifo2k.w_addr == BW - 1) b_wrap++;
  end
  always @(posedge dut.u_dvs_fifo2k.rp) if (!b_cen) begin
    automatic int blk = int'(dut.u_dvs_fifo2k.r_addr) / BSUB;
    automatic int c = b_consec;
    @(negedge dut.u_dvs_fifo2k.rp);
    if (b_vcs[blk] == VCS_HIGH) n_rd_high++;
    if (c >= 3) chk(b_vcs[blk] == VCS_HIGH, "2Kb burst read at VDDH");
  end
  always @(negedge b_clk_r) if (!b_cen) begin
    for (int k = 0; k < BNSB; k++) begin
      automatic apsc_state_e m = dut.u_dvs_fifo2k.mode[k];
      chk(b_vcs[k] != VCS_SHORT, "2Kb supplies never shorted");
      if (prev[k] == APSC_FLOAT && m == APSC_LOW)  n_fl_lo++;
      if (prev[k] == APSC_LOW   && m == APSC_WAIT) n_lo_wt++;
      if (prev[k] == APSC_WAIT  && m == APSC_TYP)  n_wt_ty++;
      if (prev[k] == APSC_TYP   && m == APSC_DSCH) n_ty_ds++;
      if (prev[k] == APSC_DSCH  && m == APSC_FLOAT) n_ds_fl++;
      prev[k] = m;
    end
  end

  // ------------------------------------------------------------------
  task automatic run_a();
    for (int ph = 0; ph < 4; ph++) begin
      automatic int target = (ph % 2 == 0) ? AW : int'($urandom_range(AW / 8, AW / 2));
      a_rd_on = 0;
      wait (a_iw - a_dr >= target);
      a_rd_on = 1;
      wait (a_dr >= a_iw - 1);
    end
    a_wr_on = 0;
    wait (a_dr == a_iw && a_dw == a_iw);
    repeat (3) @(posedge a_clk_r);
    chk(dut.u_fifo16k.power_on == '0, "16Kb empty: every word cut off");
  endtask

  task automatic run_b();
    for (int ph = 0; ph < 12; ph++) begin
      automatic int target = (ph % 2 == 0) ? BW - BSUB : int'($urandom_range(BSUB, BW / 2));
      b_rd_on = 0;
      wait (b_iw - b_dr >= target);
      b_rd_on = 1;
      wait (b_dr >= b_iw - 1);
    end
    b_wr_on = 0;
    wait (b_dr == b_iw && b_dw == b_iw);
    repeat (4) @(posedge b_clk_r);
  endtask

  initial begin
    a_cen = 1; a_wen = 1; a_ren = 1; a_d = '0; a_rd_on = 0; a_wr_on = 1; a_pend = 0;
    b_cen = 1; b_wen = 1; b_ren = 1; b_d = '0; b_rd_on = 0; b_wr_on = 1; b_pend = 0;
    a_iw = 0; a_dw = 0; a_dr = 0; a_wrap_w = 0; a_wrap_r = 0;
    b_iw = 0; b_dw = 0; b_dr = 0; b_wrap = 0; b_consec = 0;
    n_pwr_on = 0; n_pwr_off = 0; n_wok = 0; n_dly_end = 0; n_rok = 0; n_sa = 0; n_lost = 0;
    n_fl_lo = 0; n_lo_wt = 0; n_wt_ty = 0; n_ty_ds = 0; n_ds_fl = 0; n_wr_low = 0; n_rd_high = 0;
    #100ns a_cen = 0; b_cen = 0; #1ns a_cen = 1; b_cen = 1;
    #3000ns;
    for (int k = 0; k < BNSB; k++) prev[k] = dut.u_dvs_fifo2k.mode[k];
    chk(dut.u_fifo16k.power_on == '0, "16Kb all words cut off at start");
    a_cen = 0; b_cen = 0;
    fork
      run_a();
      run_b();
    join
    $display("16Kb: words %0d, wraps w %0d r %0d, power-on %0d, cut-off %0d, lost %0d",
             a_iw, a_wrap_w, a_wrap_r, n_pwr_on, n_pwr_off, n_lost);
    $display("16Kb: W_ok %0d, delay-line ends %0d, R_ok %0d, sense captures %0d",
             n_wok, n_dly_end, n_rok, n_sa);
    $display("2Kb: words %0d, wraps %0d, VDDL writes %0d, VDDH reads %0d", b_iw, b_wrap, n_wr_low, n_rd_high);
    $display("2Kb: FLOAT->LOW %0d LOW->WAIT %0d WAIT->TYP %0d TYP->DSCH %0d DSCH->FLOAT %0d",
             n_fl_lo, n_lo_wt, n_wt_ty, n_ty_ds, n_ds_fl);
    chk(n_pwr_on == a_iw, "16Kb word power-on at every write");
    chk(n_pwr_off == a_dr && n_lost == a_dr, "16Kb word cut-off and data loss after every read");
    chk(n_wok == a_iw && n_dly_end == a_iw, "16Kb worst-case W_ok and delay line end every write");
    chk(n_rok == a_dr && n_sa == a_dr, "16Kb R_ok and sense capture on every read");
    chk(a_wrap_w >= 2 && a_wrap_r >= 2, "16Kb pointers wrap");
    chk(b_wrap >= 3, "2Kb pointers wrap");
    chk(n_fl_lo > 0, "2Kb Floating -> Low-power");
    chk(n_lo_wt > 0, "2Kb Low-power -> Wait");
    chk(n_wt_ty > 0, "2Kb Wait -> Typical");
    chk(n_ty_ds > 0, "2Kb Typical -> Discharge");
    chk(n_ds_fl > 0, "2Kb Discharge -> Floating");
    chk(n_wr_low > 0, "2Kb writes at VDDL");
    chk(n_rd_high > 0, "2Kb reads at VDDH");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
