// power_switch: behavioural model of the power switches of one sub-block
// (transistor-level circuit, not synthesizable logic).
//
// Two pMOS switches connect the sub-block cell supply VCS to VDDH (MPH, gate
// ps_h) or to VDDL (MPL, gate ps_l), and an nMOS (gate dsch) discharges it.
// The model reports the resulting supply condition:
//   MPH on, MPL off -> VCS_HIGH     MPL on, MPH off -> VCS_LOW
//   both on         -> VCS_SHORT
//   both off, dsch on  -> VCS_OFF (supply discharged)
//   both off, dsch off -> previous level kept: the node floats and holds its
//   charge for the short break-before-make gap; a supply that was discharged
//   stays off.
// Switch-on takes T_ON, a parameter of this model.
module power_switch
  import fifo_pkg::*;
#(
  parameter realtime T_ON = 1ns
) (
  input  logic ps_h,
  input  logic ps_l,
  input  logic dsch,
  output vcs_e vcs
);
  timeunit 1ns; timeprecision 1ps;

  // Evaluated once at time 0 and then on every gate change; a gate change
  // cancels a level change still pending (gen counts the evaluations).
  int unsigned gen = 0;
  initial begin
    vcs = VCS_OFF;
    forever begin
      gen++;
      if (!ps_h && !ps_l) vcs = VCS_SHORT;
      else if (!ps_h || !ps_l) begin
        automatic int unsigned g = gen;
        automatic vcs_e lvl = !ps_h ? VCS_HIGH : VCS_LOW;
        fork begin #(T_ON); if (g == gen) vcs = lvl; end join_none
      end
      else if (dsch) vcs = VCS_OFF;
      @(ps_h, ps_l, dsch);
    end
  end
endmodule
