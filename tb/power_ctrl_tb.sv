// power_ctrl_tb: runs random interleaved writes (CLK_w edges with WEN = 0)
// and reads (RP pulses) on a 16-word power controller and checks after every
// event that exactly the words that have been written and not yet read out
// are powered, including the word under write; CEN turns everything off.
module power_ctrl_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 16;
  int checks = 0, failures = 0;
  logic clk_w, cen, wen, rp;
  logic [3:0] w_addr, r_addr;
  logic [W-1:0] power_on, exp_on;
  int wcnt, rcnt;

  power_ctrl #(.WORDS(W)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t: %h vs %h", what, $time, power_on, exp_on); end
  endtask

  initial begin
    #1000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clk_w = 0; cen = 0; wen = 1; rp = 0; w_addr = 0; r_addr = 0; exp_on = '0; wcnt = 0; rcnt = 0;
    #1; cen = 1; #4; chk(power_on == 0, "all cut off after CEN"); cen = 0; #5;
    for (int k = 0; k < 300; k++) begin
      int occ; occ = wcnt - rcnt;
      if ((occ < W && $urandom_range(1)) || occ == 0) begin
        w_addr = 4'(wcnt); wen = 0; #1; clk_w = 1; #1;
        exp_on[w_addr] = 1; chk(power_on == exp_on, "word powered when its write starts");
        clk_w = 0; wen = 1; wcnt++; #1;
      end else begin
        r_addr = 4'(rcnt); rp = 1; #1;
        chk(power_on == exp_on, "word still powered during its read");
        rp = 0; #1;
        exp_on[r_addr] = 0; chk(power_on == exp_on, "word cut off after read-out");
        rcnt++; #1;
      end
    end
    cen = 1; #1; chk(power_on == 0, "CEN"); cen = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
