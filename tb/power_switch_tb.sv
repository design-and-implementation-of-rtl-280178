// power_switch_tb: checks the supply produced by each combination of the
// switch gates: VDDH, VDDL, kept while floating, off after discharge, and
// SHORT when both pMOS switches are on.
module power_switch_tb;
  import fifo_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic ps_h, ps_l, dsch;
  vcs_e vcs;
  power_switch #(.T_ON(1ns)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t: %s", what, $time, vcs.name()); end
  endtask

  initial begin
    #100000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ps_h = 1; ps_l = 1; dsch = 1; #5; chk(vcs == VCS_OFF, "discharged");
    dsch = 0; #5; chk(vcs == VCS_OFF, "floating stays off");
    for (int k = 0; k < 5; k++) begin
      ps_l = 0; #2; chk(vcs == VCS_LOW, "MPL on gives VDDL");
      ps_l = 1; #5; chk(vcs == VCS_LOW, "break-before-make gap keeps charge");
      ps_h = 0; #0.5; chk(vcs == VCS_LOW, "switch-on delay"); #1; chk(vcs == VCS_HIGH, "MPH on gives VDDH");
      ps_h = 1; dsch = 1; #1; chk(vcs == VCS_OFF, "discharge");
      dsch = 0; #1; chk(vcs == VCS_OFF, "floating");
    end
    ps_h = 0; ps_l = 0; #1; chk(vcs == VCS_SHORT, "short detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
