// write_window_ctrl_tb: plays the replica column and delay line around the
// write window controller. For random write-0 and write-1 replica delays it
// checks that WP rises on the CLK_w edge only when WEN = 0, that it falls one
// delay-line time after the slower replica write (the worst-case detector).
module write_window_ctrl_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam realtime TDLY = 4ns;
  int checks = 0, failures = 0;
  logic clk_w = 0, cen, wen, done0, done1, w_ok_dly, wp, w_ok;
  int d0, d1;
  realtime t_rise, t_fall;

  write_window_ctrl dut (.*);

  always #100 clk_w = ~clk_w;

  // Replica model with delays chosen per access.
  initial begin done0 = 0; done1 = 0; end
  always @(posedge wp) begin
    fork
      begin #(d0 * 1ns); done0 = 1; end
      begin #(d1 * 1ns); done1 = 1; end
    join_none
  end
  always @(negedge wp) begin done0 = 0; done1 = 0; end
  initial w_ok_dly = 0;
  always @(w_ok) w_ok_dly <= #(TDLY) w_ok;

  always @(posedge wp) t_rise = $realtime;
  always @(negedge wp) t_fall = $realtime;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cen = 1; wen = 1; d0 = 10; d1 = 10;
    repeat (2) @(negedge clk_w);
    cen = 0;
    for (int k = 0; k < 30; k++) begin
      @(negedge clk_w);
      d0 = $urandom_range(5, 40); d1 = $urandom_range(5, 40);
      if (d0 == d1) d1++;
      wen = (k % 5 == 4);
      @(posedge clk_w); #0.1;
      if (wen) begin
        chk(wp == 0, "no pulse without WEN");
      end else begin
        chk(wp == 1, "pulse opened at CLK_w edge");
        @(negedge wp); #0.1;
        chk((((t_fall - t_rise) - ((d0 > d1 ? d0 : d1) * 1ns + TDLY)) < 0.01ns && ((t_fall - t_rise) - ((d0 > d1 ? d0 : d1) * 1ns + TDLY)) > -0.01ns), "window = slower replica + delay line");
        chk(w_ok == 0, "W_ok released with the window");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
