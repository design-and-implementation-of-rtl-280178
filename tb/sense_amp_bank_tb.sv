// sense_amp_bank_tb: checks that Q takes the read bit lines exactly at the
// rising edge of R-ok, holds afterwards and is cleared by CEN.
module sense_amp_bank_tb;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic cen, r_ok;
  logic [15:0] rbl, q;
  sense_amp_bank #(.DATA_W(16)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cen = 1; r_ok = 0; rbl = '1; #5; chk(q == 0, "cleared"); cen = 0; #5;
    for (int k = 0; k < 50; k++) begin
      logic [15:0] v, old;
      old = q; v = 16'($urandom);
      rbl = v; #2; chk(q == old, "no change before R-ok");
      r_ok = 1; #1; chk(q == v, "latched at R-ok");
      rbl = ~v; #2; chk(q == v, "held"); r_ok = 0; #2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
