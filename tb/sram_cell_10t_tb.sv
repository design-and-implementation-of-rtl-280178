// sram_cell_10t_tb: checks the 10T cell model: single-ended write after
// T_WRITE, hold while WWL is low, read bit line pulled down only for a
// stored 0 and only while RWL is high (after T_READ), data lost without supply.
module sram_cell_10t_tb;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic vcs_on, wwl, wbl, rwl, rbl_pd, vl;

  sram_cell_10t #(.T_WRITE(2ns), .T_READ(3ns)) dut (.*);

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0b exp %0b at %0t", what, got, exp, $time); end
  endtask

  initial begin
    #100000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    vcs_on = 1; wwl = 0; wbl = 0; rwl = 0;
    #10;
    for (int k = 0; k < 20; k++) begin
      logic b; b = 1'($urandom);
      wbl = b; wwl = 1; #1;
      #2; chk(vl, b, "write");
      wwl = 0; #1; wbl = ~b; #5; chk(vl, b, "hold");
      rwl = 1; #1; chk(rbl_pd, 1'b0, "read before T_READ");
      #3; chk(rbl_pd, ~b, "read pull-down");
      rwl = 0; #1; chk(rbl_pd, 1'b0, "unselected");
    end
    // write 1 and check a timing point in between
    wbl = 0; wwl = 1; #3; wwl = 0; #1;
    wbl = 1; wwl = 1; #1.5; chk(vl, 1'b0, "not yet written"); #1; chk(vl, 1'b1, "written"); wwl = 0;
    vcs_on = 0; #3; chk(vl, 1'b0, "lost without supply");
    rwl = 1; #4; chk(rbl_pd, 1'b1, "gated cell reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
