// dvs_fifo2k_tb: self-checking test of the 2 Kb FIFO with dynamic voltage
// scaling (128 x 16, eight 16-word sub-blocks) at the document's access
// periods, 33 us write and 1.6 us read.
//
// The testbench is the sensor-node controller: it requests reads only for
// completed writes and keeps the writer at least one sub-block behind the
// reader's previous lap (the FIFO has no flags). Fill and drain phases
// alternate so the pointers wrap several times.
// Checked:
//  * every word read equals the word written in that position;
//  * Q is valid before the next read clock edge;
//  * write window = slower 9T replica write + delay line, read window = 9T
//    replica read discharge;
//  * a sub-block holding unread data, or being written, is always supplied;
//    it is written at VDDL and, once a read burst has run for two read
//    clocks, read at VDDH; a read-out sub-block goes through discharge to
//    floating and loses its contents;
//  * the two power switches of a sub-block are never on together and at
//    most two sub-blocks are at VDDH;
//  * each mode change of the document happens: Floating -> Low-power,
//    Low-power -> Wait, Wait -> Typical, Typical -> Discharge,
//    Discharge -> Floating.
module dvs_fifo2k_tb;
  import fifo_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int      DATA_W = 16;

  localparam int      W      = 128;
  localparam int      SUB    = 16;
  localparam int      NSB    = W / SUB;
  localparam realtime T_W    = 33000ns;
  localparam realtime T_R    = 1600ns;
  localparam realtime WP_LEN = 33ns;     // max(20 + 8, 20) + 5
  localparam realtime RP_LEN = 25ns;     // 5 + 20

  int checks = 0, failures = 0;
  logic clk_w = 0, clk_r = 0, cen, wen, ren;
  logic [DATA_W-1:0] d, q;
  vcs_e vcs [NSB];

  dvs_fifo2k dut (.*);

  initial begin #5000ns; forever #(T_W / 2) clk_w = ~clk_w; end
  initial begin #300ns;  forever #(T_R / 2) clk_r = ~clk_r; end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200ms failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [DATA_W-1:0] sb [$];
  logic [DATA_W-1:0] rd_exp;
  int issued_w, done_w, done_r, n_wrap, consec;
  int n_fl_lo, n_lo_wt, n_wt_ty, n_ty_ds, n_ds_fl, n_rd_high, n_rd_low;
  bit reads_on, writes_on, rd_pending;
  realtime t_wp, t_rp;
  apsc_state_e prev [NSB];

  always @(posedge dut.wp) t_wp = $realtime;
  always @(negedge dut.wp) if (!cen) begin
    chk(($realtime - t_wp) > WP_LEN - 0.01ns && ($realtime - t_wp) < WP_LEN + 0.01ns,
        "write window = worst 9T replica + delay");
    done_w++;
  end
  always @(posedge dut.wp) if (!cen) begin
    chk(vcs[dut.w_addr / SUB] == VCS_LOW || vcs[dut.w_addr / SUB] == VCS_HIGH,
        "written sub-block supplied");
    if (dut.w_addr == W - 1) n_wrap++;
  end
  always @(posedge dut.rp) t_rp = $realtime;
  always @(negedge dut.rp) if (!cen)
    chk(($realtime - t_rp) > RP_LEN - 0.01ns && ($realtime - t_rp) < RP_LEN + 0.01ns,
        "read window = 9T replica discharge");

  // Write side.
  always @(negedge clk_w) begin
    if (!cen && writes_on && issued_w - done_r < W - SUB && $urandom_range(7) != 0) begin
      wen = 0; d = DATA_W'($urandom);
    end else wen = 1;
  end
  always @(posedge clk_w) if (!cen && !wen) begin
    issued_w++;
    sb.push_back(d);
  end

  // Read side.
  always @(negedge clk_r) begin
    if (!cen && reads_on && done_w > done_r) ren = 0;
    else ren = 1;
  end
  always @(posedge clk_r) begin
    if (rd_pending) chk(q == rd_exp, "read data valid within one read clock");
    rd_pending = 0;
    if (!cen && !ren) begin
      rd_exp = sb.pop_front();
      rd_pending = 1;
      done_r++;
      consec++;
    end else consec = 0;
  end
  // Supply level seen by each read, taken at the end of its window (the
  // sub-block read first after a wake-up switches over during its window).
  always @(posedge dut.rp) if (!cen) begin
    automatic int b = int'(dut.r_addr) / SUB;
    automatic int c = consec;
    @(negedge dut.rp);
    if (vcs[b] == VCS_HIGH) n_rd_high++; else n_rd_low++;
    chk(vcs[b] != VCS_OFF && vcs[b] != VCS_SHORT, "read sub-block supplied");
    if (c >= 3) chk(vcs[b] == VCS_HIGH, "burst read at VDDH");
  end

  // Per read clock: switch states, supplied sub-blocks, transitions.
  always @(negedge clk_r) if (!cen) begin
    automatic int nhigh = 0;
    for (int k = 0; k < NSB; k++) begin
      automatic apsc_state_e m = dut.mode[k];
      chk(vcs[k] != VCS_SHORT, "VDDH and VDDL never shorted");
      if (m == APSC_WAIT || m == APSC_TYP) nhigh++;
      if (prev[k] == APSC_FLOAT && m == APSC_LOW)  n_fl_lo++;
      if (prev[k] == APSC_LOW   && m == APSC_WAIT) n_lo_wt++;
      if (prev[k] == APSC_WAIT  && m == APSC_TYP)  n_wt_ty++;
      if (prev[k] == APSC_TYP   && m == APSC_DSCH) n_ty_ds++;
      if (prev[k] == APSC_DSCH  && m == APSC_FLOAT) begin
        n_ds_fl++;
        chk(vcs[k] == VCS_OFF, "floating sub-block discharged");
        for (int i = 0; i < SUB; i++)
          chk(dut.u_array.mem[k * SUB + i] == '0, "read-out sub-block has lost its data");
      end
      prev[k] = m;
    end
    chk(nhigh <= 2, "at most two sub-blocks at VDDH");
    for (int a = done_r; a < issued_w; a++)
      chk(vcs[(a % W) / SUB] inside {VCS_LOW, VCS_HIGH}, "unread data supplied");
  end

  initial begin
    cen = 1; wen = 1; ren = 1; d = '0; reads_on = 0; writes_on = 1; rd_pending = 0;
    issued_w = 0; done_w = 0; done_r = 0; n_wrap = 0; consec = 0;
    n_fl_lo = 0; n_lo_wt = 0; n_wt_ty = 0; n_ty_ds = 0; n_ds_fl = 0;
    n_rd_high = 0; n_rd_low = 0;
    #100ns cen = 0; #1ns cen = 1;
    #3000ns;
    chk(dut.mode[0] == APSC_LOW, "first sub-block Low-power after reset");
    for (int k = 1; k < NSB; k++) chk(dut.mode[k] == APSC_FLOAT, "other sub-blocks Floating");
    chk(q == '0, "output cleared");
    for (int k = 0; k < NSB; k++) prev[k] = dut.mode[k];
    cen = 0;
    for (int ph = 0; ph < 8; ph++) begin
      automatic int target = (ph % 2 == 1) ? W - SUB : int'($urandom_range(SUB, W / 2));
      reads_on = 0;
      wait (issued_w - done_r >= target);
      reads_on = 1;
      wait (done_r >= issued_w - 1);
    end
    writes_on = 0;
    wait (done_r == issued_w && done_w == issued_w);
    repeat (4) @(posedge clk_r);
    chk(n_wrap >= 3, "pointers wrapped");
    chk(n_fl_lo > 0, "Floating -> Low-power occurs");
    chk(n_lo_wt > 0, "Low-power -> Wait occurs");
    chk(n_wt_ty > 0, "Wait -> Typical occurs");
    chk(n_ty_ds > 0, "Typical -> Discharge occurs");
    chk(n_ds_fl > 0, "Discharge -> Floating occurs");
    $display("words %0d, wraps %0d, reads at VDDH %0d at VDDL %0d", issued_w, n_wrap, n_rd_high, n_rd_low);
    $display("FLOAT->LOW %0d LOW->WAIT %0d WAIT->TYP %0d TYP->DSCH %0d DSCH->FLOAT %0d",
             n_fl_lo, n_lo_wt, n_wt_ty, n_ty_ds, n_ds_fl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
