// replica_column_tb: checks the replica timings for both cell types: done0
// after the loaded bit-line discharge plus the cell write, done1 after the
// cell write of a 1, both cleared and restored between windows, and the
// replica read bit line discharging after cell plus bit-line delay.
module replica_column_tb;
  timeunit 1ns; timeprecision 1ps;
  int checks = 0, failures = 0;
  logic wp, rp;
  logic d0a, d1a, rbla, d0b, d1b, rblb;

  replica_column #(.CELL_9T(0), .T_WBL0(20ns), .T_CELL_W0(5ns), .T_CELL_W1(15ns), .T_CELL_RD(5ns), .T_RBL(20ns))
    dut_a (.wp, .rp, .done0(d0a), .done1(d1a), .rbl_rp(rbla));
  replica_column #(.CELL_9T(1), .T_WBL0(40ns), .T_CELL_W0(5ns), .T_CELL_W1(10ns), .T_CELL_RD(10ns), .T_RBL(30ns))
    dut_b (.wp, .rp, .done0(d0b), .done1(d1b), .rbl_rp(rblb));

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wp = 0; rp = 0; #100;
    for (int k = 0; k < 5; k++) begin
      wp = 1;
      #9;   chk(!d1a && !d0a && !d1b && !d0b, "nothing done at 9 ns");
      #2;   chk(d1b && !d0b, "9T write 1 at 10 ns"); chk(!d1a, "10T write 1 not yet");
      #5;   chk(d1a && !d0a, "10T write 1 at 15 ns");
      #10;  chk(d0a && d1a, "10T write 0 at 25 ns"); chk(!d0b, "9T write 0 not yet");
      #20;  chk(d0b && d1b, "9T write 0 at 45 ns");
      wp = 0; #1; chk(!d0a && !d1a && !d0b && !d1b, "cleared");
      #100;
      rp = 1;
      #24;  chk(rbla && rblb, "read bit lines still high");
      #2;   chk(!rbla && rblb, "10T replica discharged at 25 ns");
      #15;  chk(!rblb, "9T replica discharged at 40 ns");
      rp = 0; #1; chk(rbla && rblb, "precharged");
      #100;
      // a window closed early leaves no late event behind
      wp = 1; #(2 + k); wp = 0; #60;
      chk(!d0a && !d1a && !d0b && !d1b, "short window: nothing done afterwards");
      rp = 1; #(2 + k); rp = 0; #60;
      chk(rbla && rblb, "short read window: bit lines stay precharged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
