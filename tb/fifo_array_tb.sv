// fifo_array_tb: writes random data into random words of a 32-word array
// through one-hot word-line pulses, reads them back through the read word
// lines, checks that an unselected read port reads all ones, that writes
// only reach the selected word, and that a word without supply loses its data.
module fifo_array_tb;
  timeunit 1ns; timeprecision 1ps;
  localparam int W = 32;
  int checks = 0, failures = 0;
  logic [W-1:0] wwl, rwl, retain;
  logic [15:0] wbl, rbl;
  logic [15:0] ref_mem [W];

  fifo_array #(.WORDS(W), .DATA_W(16)) dut (.*);

  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h at %0t", what, got, exp, $time); end
  endtask

  initial begin
    #1000000 failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wwl = '0; rwl = '0; retain = '1; wbl = '0;
    #1;
    for (int i = 0; i < W; i++) begin
      ref_mem[i] = 16'($urandom);
      wbl = ref_mem[i]; #1; wwl[i] = 1; #2; wwl[i] = 0; #1; wbl = ~wbl; #1;
    end
    chk(rbl, 16'hffff, "no word selected");
    for (int k = 0; k < 200; k++) begin
      int i; i = $urandom_range(W-1);
      if ($urandom_range(1)) begin
        ref_mem[i] = 16'($urandom);
        wbl = ref_mem[i]; #1; wwl[i] = 1; #2; wwl[i] = 0; #1; wbl = 16'($urandom); #1;
      end
      i = $urandom_range(W-1);
      rwl[i] = 1; #1; chk(rbl, ref_mem[i], "read"); rwl[i] = 0; #1;
    end
    // gate one word's supply
    retain[5] = 0; #1; retain[5] = 1; #1;
    rwl[5] = 1; #1; chk(rbl, 16'h0000, "gated word lost"); rwl[5] = 0; #1;
    rwl[6] = 1; #1; chk(rbl, ref_mem[6], "neighbour kept"); rwl[6] = 0; #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
