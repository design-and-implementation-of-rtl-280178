// sram_cell_9t_tb: checks the 9T cell model in each supply mode: slower
// write and read at VDDL than at VDDH, hold, read polarity, and loss of data
// when the sub-block supply is cut.
module sram_cell_9t_tb;
  import fifo_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  vcs_e vcs;
  logic wwl, wbl, rwl, rbl_pd, vl;

  sram_cell_9t #(.T_WRITE_LOW(6ns), .T_WRITE_HIGH(2ns), .T_READ_LOW(8ns), .T_READ_HIGH(3ns)) dut (.*);

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0b exp %0b at %0t", what, got, exp, $time); end
  endtask

  initial begin
    #100000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    vcs = VCS_LOW; wwl = 0; wbl = 0; rwl = 0;
    #10;
    for (int k = 0; k < 16; k++) begin
      logic b; b = 1'($urandom);
      vcs = VCS_LOW;
      wbl = 0; wwl = 1; #7; wbl = 1; #3;  // at VDDL 1 is not yet written after 3 ns
      chk(vl, 1'b0, "slow write at VDDL");
      #4; chk(vl, 1'b1, "write at VDDL");
      wbl = b; #7; chk(vl, b, "write data"); wwl = 0; #1; wbl = ~b; #10; chk(vl, b, "hold at VDDL");
      vcs = VCS_HIGH; #1;
      rwl = 1; #4; chk(rbl_pd, ~b, "read at VDDH"); rwl = 0; #1; chk(rbl_pd, 1'b0, "unselected");
      vcs = VCS_LOW; #1; rwl = 1; #4; chk(rbl_pd, 1'b0, "read at VDDL not done at 4 ns");
      #5; chk(rbl_pd, ~b, "read at VDDL"); rwl = 0; #1;
    end
    vcs = VCS_HIGH; wbl = 1; wwl = 1; #3; wwl = 0; chk(vl, 1'b1, "write at VDDH");
    vcs = VCS_OFF; #1; chk(vl, 1'b0, "floating loses data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
