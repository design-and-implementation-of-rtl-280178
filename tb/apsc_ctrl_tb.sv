// apsc_ctrl_tb: runs a 128-word, 16-word-sub-block power switch controller
// from a model of the two pointers (slow write clock, fast read clock) and
// checks: the reset modes; that every sub-block holding unread data, or being
// written, is supplied (Low-power, Wait or Typical); that a sub-block being
// read has reached Typical within two read clocks of its first read request;
// that at most two sub-blocks are in Wait/Typical; that read-out sub-blocks
// return to Floating; and that every mode transition of the document occurs.
module apsc_ctrl_tb;
  import fifo_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 128, SUB = 16, NSB = 8;
  int checks = 0, failures = 0;
  logic clk_w = 0, clk_r = 0, cen, wen, ren;
  logic [6:0] w_addr, r_addr;
  apsc_state_e mode [NSB];
  logic [NSB-1:0] ps_l, ps_h, dsch;
  int wcnt, rcnt, n_float_low, n_typ, n_float, rd_typ_late;
  apsc_state_e prev [NSB];

  apsc_ctrl #(.WORDS(W), .SUB(SUB)) dut (.*);

  always #200 clk_w = ~clk_w;
  always #10  clk_r = ~clk_r;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Pointer models: the address steps after each access.
  always @(posedge clk_w) if (!cen && !wen) begin #1; wcnt++; w_addr = 7'(wcnt); end
  always @(posedge clk_r) if (!cen && !ren) begin #1; rcnt++; r_addr = 7'(rcnt); end

  // Invariants checked on every read clock.
  always @(negedge clk_r) if (!cen) begin
    int tcount; tcount = 0;
    for (int k = 0; k < NSB; k++) begin
      if (mode[k] == APSC_WAIT || mode[k] == APSC_TYP) tcount++;
      if (prev[k] == APSC_FLOAT && mode[k] == APSC_LOW) n_float_low++;
      if (prev[k] == APSC_WAIT && mode[k] == APSC_TYP) n_typ++;
      if (prev[k] == APSC_DSCH && mode[k] == APSC_FLOAT) n_float++;
      prev[k] = mode[k];
    end
    chk(tcount <= 2, "at most two sub-blocks at VDDH");
    for (int a = rcnt; a < wcnt; a++) begin
      int b; b = (a % W) / SUB;
      chk(mode[b] inside {APSC_LOW, APSC_WAIT, APSC_TYP}, "unread data supplied");
    end
  end

  // A read that has run for two read clocks in a sub-block finds it in Typical.
  always @(posedge clk_r) if (!cen && !ren && (rcnt % SUB) >= 2) begin
    chk(mode[(rcnt % W) / SUB] == APSC_TYP, "read sub-block in Typical");
  end

  initial begin
    cen = 1; wen = 1; ren = 1; wcnt = 0; rcnt = 0; w_addr = 0; r_addr = 0;
    n_float_low = 0; n_typ = 0; n_float = 0;
    #50;
    chk(mode[0] == APSC_LOW, "first sub-block Low-power");
    for (int k = 1; k < NSB; k++) chk(mode[k] == APSC_FLOAT, "others Floating");
    for (int k = 0; k < NSB; k++) prev[k] = mode[k];
    cen = 0;
    // Receiving: write 40 words.
    @(negedge clk_w); wen = 0;
    wait (wcnt == 40); @(negedge clk_w); wen = 1;
    // Transmitting while receiving continues: burst reads, staying behind.
    wen = 0;
    repeat (6) begin
      wait (wcnt - rcnt >= 36);
      while (wcnt - rcnt > 4) begin @(negedge clk_r); ren = 0; end
      @(negedge clk_r); ren = 1;
    end
    @(negedge clk_w); wen = 1;
    forever begin
      @(negedge clk_r);
      if (rcnt < wcnt) ren = 0;
      else begin ren = 1; break; end
    end
    repeat (5) @(negedge clk_r);
    for (int k = 0; k < NSB; k++)
      if (k != ((rcnt % W) / SUB)) chk(mode[k] == APSC_FLOAT, "read-out sub-blocks Floating");
    chk(wcnt > W, "pointers wrapped");
    chk(n_float_low > 0 && n_typ > 0 && n_float > 0, "all transitions seen");
    $display("transitions float->low %0d wait->typ %0d dsch->float %0d", n_float_low, n_typ, n_float);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
