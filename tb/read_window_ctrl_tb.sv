// read_window_ctrl_tb: plays the replica read bit line. For random replica
// discharge times it checks that RP rises on the CLK_r edge only when REN = 0,
// that R-ok rises exactly when the replica bit line has discharged, and that
// RP then closes at once.
module read_window_ctrl_tb;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk_r = 0, cen, ren, rbl_rp, rp, r_ok;
  int dr;
  realtime t_rise, t_fall, t_ok;

  read_window_ctrl dut (.*);

  always #50 clk_r = ~clk_r;

  initial rbl_rp = 1;
  always @(posedge rp) begin
    fork begin #(dr * 1ns); rbl_rp = 0; end join_none
  end
  always @(negedge rp) rbl_rp = 1;
  always @(posedge rp) t_rise = $realtime;
  always @(negedge rp) t_fall = $realtime;
  always @(posedge r_ok) t_ok = $realtime;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cen = 1; ren = 1; dr = 10;
    repeat (2) @(negedge clk_r);
    cen = 0;
    for (int k = 0; k < 30; k++) begin
      @(negedge clk_r);
      dr = $urandom_range(3, 40);
      ren = (k % 4 == 3);
      @(posedge clk_r); #0.1;
      if (ren) chk(rp == 0, "no pulse without REN");
      else begin
        chk(rp == 1, "pulse opened at CLK_r edge");
        @(negedge rp); #0.1;
        chk((((t_fall - t_rise) - dr * 1ns) < 0.01ns && ((t_fall - t_rise) - dr * 1ns) > -0.01ns), "window = replica discharge time");
        chk(t_ok == t_fall, "R-ok closes the window");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
