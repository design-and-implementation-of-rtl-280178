// delay_line: behavioural model of an inverter delay line (an analog timing
// element, not synthesizable logic).
//
// It returns its input after DELAY, on both edges. The write window control
// uses it to hold the write word line open a little after the replica write
// has completed, for margin. The delay value is a parameter of this model;
// the document gives none.
module delay_line #(
  parameter realtime DELAY = 5ns
) (
  input  logic a,
  output logic y
);
  timeunit 1ns; timeprecision 1ps;

  initial y = 1'b0;
  always @(a) y <= #(DELAY) a;
endmodule
