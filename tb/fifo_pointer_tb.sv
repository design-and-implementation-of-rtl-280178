// fifo_pointer_tb: applies window pulses to a 16-word pointer and checks that
// the address counts 0,1,..,15,0 with one step per closed pulse, that the word
// line is the decoded address gated by the pulse (one-hot while it is high,
// all low otherwise), and that CEN clears the counter.
module fifo_pointer_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 16;
  int checks = 0, failures = 0;
  logic cen, pulse;
  logic [3:0] addr;
  logic [W-1:0] sel, wl;
  int exp_addr;

  fifo_pointer #(.WORDS(W)) dut (.*);

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h at %0t", what, got, exp, $time); end
  endtask

  initial begin
    #100000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cen = 1; pulse = 0; #5; cen = 0; #5;
    exp_addr = 0;
    for (int k = 0; k < 40; k++) begin
      chk(addr, exp_addr, "addr");
      chk(wl, 0, "word lines low between pulses");
      pulse = 1; #2;
      chk(wl, 32'(1) << exp_addr, "selected word line");
      chk(sel, 32'(1) << exp_addr, "decoder");
      pulse = 0; #2;
      exp_addr = (exp_addr + 1) % W;
    end
    cen = 1; #1; chk(addr, 0, "cleared by CEN"); cen = 0; #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
