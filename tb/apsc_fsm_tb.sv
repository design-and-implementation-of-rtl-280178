// apsc_fsm_tb: drives the request inputs of one sub-block controller with
// random values and checks every clock against an independent model of the
// document's mode sequence Floating -> Low-power -> Wait -> Typical ->
// Discharge -> Floating, the switch gates of each state (never both pMOS on)
// and the reset state of the first and of the other sub-blocks.
module apsc_fsm_tb;
  import fifo_pkg::*;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic clk = 0, cen, lp_req, typ_req, rel_req;
  apsc_state_e mode, mode1;
  logic ps_l, ps_h, dsch, ps_l1, ps_h1, dsch1;
  int m;  // model: 0 float, 1 low, 2 wait, 3 typ, 4 dsch
  int seen [5];

  apsc_fsm #(.RESET_LOW(1'b0)) dut (.*);
  apsc_fsm #(.RESET_LOW(1'b1)) dut_first (.clk, .cen, .lp_req, .typ_req, .rel_req, .mode(mode1), .ps_l(ps_l1), .ps_h(ps_h1), .dsch(dsch1));

  always #10 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t (mode %0d model %0d)", what, $time, mode, m); end
  endtask

  initial begin
    #1000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cen = 1; lp_req = 0; typ_req = 0; rel_req = 0; m = 0;
    #25;
    chk(mode == APSC_FLOAT && ps_l && ps_h && !dsch, "reset Floating");
    chk(mode1 == APSC_LOW && !ps_l1 && ps_h1, "first sub-block resets to Low-power");
    cen = 0;
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      lp_req = 1'($urandom_range(3) == 0); typ_req = 1'($urandom_range(3) == 0); rel_req = 1'($urandom_range(3) == 0);
      @(posedge clk);
      case (m)
        0: if (lp_req) m = 1;
        1: if (typ_req) m = 2;
        2: m = 3;
        3: if (rel_req) m = 4;
        4: m = 0;
        default: m = 0;
      endcase
      #1;
      seen[m]++;
      chk(int'(mode) == m, "state sequence");
      chk(ps_l == (m != 1), "MPL on only in Low-power");
      chk(ps_h == (m != 3), "MPH on only in Typical");
      chk(dsch == (m == 4), "discharge only in Discharge");
      chk(!(!ps_l && !ps_h), "never both supplies");
    end
    for (int s = 0; s < 5; s++) chk(seen[s] > 0, "every state visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
