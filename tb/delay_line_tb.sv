// delay_line_tb: checks that both edges come out DELAY later.
module delay_line_tb;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic a, y;
  delay_line #(.DELAY(7ns)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    a = 0; #20;
    for (int k = 0; k < 10; k++) begin
      a = ~a; #6.9; chk(y != a, "not before the delay"); #0.2; chk(y == a, "after the delay"); #20;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
