// apsc_fsm: adaptive power switch control (APSC) state machine of one
// sub-block of the row-controlled DVS FIFO.
//
// How it works. A sub-block (16 words) is in one of three operating modes:
//   Floating   supply cut off (read-out data need no retention)
//   Low-power  cell supply VCS = VDDL (0.3 V): being written or holding data
//   Typical    cell supply VCS = VDDH (0.5 V): about to be read at speed
// Two transient states make the supply switching safe:
//   Wait       between Low-power and Typical both pMOS switches are off for
//              one clock, so MPL is surely off before MPH turns on and the two
//              supplies are never shorted (break before make)
//   Discharge  between Typical and Floating the discharge nMOS pulls VCS down
//              from VDDH for one clock, so that VCS cannot later push charge
//              back into VDDL when MPL turns on
// Transitions: Floating -> Low-power on lp_req (the write pointer is about to
// need this sub-block); Low-power -> Wait -> Typical on typ_req (the read
// pointer is about to need it); Typical -> Discharge -> Floating on rel_req
// (its last word has been read out).
//
// Outputs are the gate levels of the switches: ps_l and ps_h drive the gates
// of the pMOS switches MPL and MPH, so 0 = switch on; dsch drives the nMOS
// gate, 1 = on. mode gives the state for observation.
//
// Timing: one transition per rising clk edge (the read clock); a one-clock
// Wait and Discharge replace the document's delay line and discharge pulse,
// whose lengths it does not give. RESET_LOW = 1 starts the machine in
// Low-power (the first sub-block), otherwise in Floating.
module apsc_fsm
  import fifo_pkg::*;
#(
  parameter bit RESET_LOW = 1'b0
) (
  input  logic        clk,
  input  logic        cen,
  input  logic        lp_req,
  input  logic        typ_req,
  input  logic        rel_req,
  output apsc_state_e mode,
  output logic        ps_l,
  output logic        ps_h,
  output logic        dsch
);
  timeunit 1ns; timeprecision 1ps;

  apsc_state_e nxt;

  always_comb begin
    nxt = mode;
    unique case (mode)
      APSC_FLOAT: if (lp_req)  nxt = APSC_LOW;
      APSC_LOW:   if (typ_req) nxt = APSC_WAIT;
      APSC_WAIT:               nxt = APSC_TYP;
      APSC_TYP:   if (rel_req) nxt = APSC_DSCH;
      APSC_DSCH:               nxt = APSC_FLOAT;
      default:                 nxt = APSC_FLOAT;
    endcase
  end

  always_ff @(posedge clk or posedge cen) begin
    if (cen) mode <= RESET_LOW ? APSC_LOW : APSC_FLOAT;
    else     mode <= nxt;
  end

  always_comb begin
    ps_l = (mode != APSC_LOW);
    ps_h = (mode != APSC_TYP);
    dsch = (mode == APSC_DSCH);
  end

  // The two supplies must never be connected together.
  always_comb a_no_short: assert (ps_l || ps_h);
endmodule
