// sense_amp_bank: single-ended sense amplifiers and output data latch.
//
// How it works. Each read bit line rbl[j] is precharged high and pulled low
// by a selected cell storing 0, so its level is the stored bit. The sense
// amplifiers are enabled together with the read word line; the moment the
// replica says the slowest bit line has developed (rising edge of R-ok), all
// DATA_W amplifiers resolve and the result is held on Q until the next read.
// CEN = 1 clears Q.
//
// Interface: rbl from the array, r_ok from the read window control, q is the
// FIFO output Q[15:0]. Timing: Q changes once per read, at the R-ok edge,
// i.e. within the CLK_r cycle that started the read.
module sense_amp_bank #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              cen,
  input  logic              r_ok,
  input  logic [DATA_W-1:0] rbl,
  output logic [DATA_W-1:0] q
);
  timeunit 1ns; timeprecision 1ps;

  always_ff @(posedge r_ok or posedge cen) begin
    if (cen) q <= '0;
    else     q <= rbl;
  end
endmodule
