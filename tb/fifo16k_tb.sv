// fifo16k_tb: self-checking test of the complete 16 Kb FIFO (1024 x 16) at
// the document's clocks, 50 kHz write and 625 kHz read, free-running and
// unrelated in phase.
//
// The FIFO has no full/empty flags, so the testbench acts as the sensor-node
// controller: it keeps its own count of stored words and only requests a
// read when a completed write is waiting, or a write when a word is free.
// Fill phases (reads held off until a random level up to the whole array) and
// drain phases alternate, so the pointers wrap several times.
// Checked:
//  * every word read equals the word written in that position (scoreboard);
//  * Q is valid before the next read clock edge (one read per CLK_r cycle);
//  * the write window lasts max(write-0, write-1 replica) + delay line and
//    the read window the replica read discharge time;
//  * the powered words are exactly those written and not yet read out, a
//    word is active from the start of its write and its contents are lost
//    once it returns to cutoff;
//  * CEN = 1 stops access, cuts every word off and restarts the pointers.
module fifo16k_tb;
  import fifo_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int      DATA_W = 16;

  localparam int      W      = 1024;
  localparam realtime T_W    = 20000ns;  // 50 kHz
  localparam realtime T_R    = 1600ns;   // 625 kHz
  localparam realtime WP_LEN = 30ns;     // max(20 + 5, 15) + 5
  localparam realtime RP_LEN = 25ns;     // 5 + 20

  int checks = 0, failures = 0;
  logic clk_w = 0, clk_r = 0, cen, wen, ren;
  logic [DATA_W-1:0] d, q;

  fifo16k dut (.*);

  initial begin #7000ns; forever #(T_W / 2) clk_w = ~clk_w; end
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

  logic [DATA_W-1:0] sb [$];   // written, not yet requested for read
  int issued_w, done_w, done_r, n_wrap_w;
  bit reads_on, writes_on, rd_pending;
  logic [DATA_W-1:0] rd_exp;
  realtime t_wp, t_rp;

  // Window widths.
  always @(posedge dut.wp) t_wp = $realtime;
  always @(negedge dut.wp) if (!cen) begin
    chk(($realtime - t_wp) > WP_LEN - 0.01ns && ($realtime - t_wp) < WP_LEN + 0.01ns,
        "write window = worst replica + delay");
    done_w++;
  end
  always @(posedge dut.wp) if (!cen && dut.w_addr == W - 1) n_wrap_w++;
  always @(posedge dut.rp) t_rp = $realtime;
  always @(negedge dut.rp) if (!cen) begin
    chk(($realtime - t_rp) > RP_LEN - 0.01ns && ($realtime - t_rp) < RP_LEN + 0.01ns,
        "read window = replica discharge");
  end

  // Write side: new data at each falling CLK_w edge.
  always @(negedge clk_w) begin
    if (!cen && writes_on && issued_w - done_r < W && $urandom_range(9) != 0) begin
      wen = 0; d = DATA_W'($urandom);
    end else wen = 1;
  end
  always @(posedge clk_w) if (!cen && !wen) begin
    issued_w++;
    sb.push_back(d);
  end

  // Read side: request when a write has completed and is not yet read.
  always @(negedge clk_r) begin
    if (!cen && reads_on && done_w > done_r) ren = 0;
    else ren = 1;
  end
  // Q of a read is checked at the next read clock edge, then the next read
  // (if requested) is taken from the scoreboard.
  always @(posedge clk_r) begin
    if (rd_pending) chk(q == rd_exp, "read data valid within one read clock");
    rd_pending = 0;
    if (!cen && !ren) begin
      rd_exp = sb.pop_front();
      rd_pending = 1;
      done_r++;
    end
  end

  // Power state and data loss, checked at every write-clock midpoint.
  always @(negedge clk_w) if (!cen) begin
    automatic int occ = issued_w - done_r;
    automatic int nact = $countones(dut.power_on);
    chk(nact == occ || nact == occ + 1, "active words = words holding data");
  end
  always @(negedge dut.rp) if (!cen) begin
    automatic int a = int'(dut.r_addr);
    #1ns;
    chk(!dut.power_on[a], "word cut off after read-out");
    chk(dut.u_array.mem[a] == '0, "cutoff word has lost its contents");
  end
  always @(posedge dut.wp) if (!cen) chk(dut.power_on[dut.w_addr], "word active when its write starts");

  initial begin
    cen = 1; wen = 1; ren = 1; d = '0; reads_on = 0; writes_on = 1; rd_pending = 0;
    issued_w = 0; done_w = 0; done_r = 0; n_wrap_w = 0;
    #100ns cen = 0;  // asynchronous enable: pointers and power states reset
    #1ns; cen = 1; #1000ns;
    chk(dut.power_on == '0, "all words cut off while disabled");
    chk(q == '0, "output cleared");
    cen = 0;
    for (int ph = 0; ph < 5; ph++) begin
      automatic int target = (ph % 2 == 1) ? W : int'($urandom_range(W / 8, W / 2));
      reads_on = 0;
      wait (issued_w - done_r >= target);
      if (ph % 2 == 1) begin
        @(posedge clk_w); #1ns;
        chk(dut.power_on == '1, "full array: every word active");
      end
      reads_on = 1;
      wait (done_r >= issued_w - 2);
    end
    // Drain completely, check, then restart with CEN.
    writes_on = 0; reads_on = 1;
    wait (done_r == issued_w && done_w == issued_w);
    repeat (3) @(posedge clk_r);
    chk(dut.power_on == '0, "empty FIFO: every word cut off");
    chk(n_wrap_w >= 2, "write pointer wrapped");
    @(negedge clk_r); cen = 1; #1ns;
    chk(dut.w_addr == 0 && dut.r_addr == 0, "CEN restarts the pointers");
    #(2 * T_W);
    chk(!dut.wp && !dut.rp, "no access while disabled");
    cen = 0; writes_on = 1; reads_on = 1;
    wait (issued_w >= done_r + 1 && done_r > 0 && issued_w > 0);
    wait (issued_w - done_r > 0 && issued_w % 64 == 0);
    writes_on = 0;
    wait (done_r == issued_w && done_w == issued_w);
    repeat (3) @(posedge clk_r);
    chk(dut.power_on == '0, "empty after restart");
    $display("words written %0d read %0d, write pointer wraps %0d", issued_w, done_r, n_wrap_w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
