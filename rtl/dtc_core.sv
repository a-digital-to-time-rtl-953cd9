// dtc_core: behavioural model of the 64-stage DTC delay line (analog).
//
// Not synthesizable: a timing model of the transistor circuit, for
// simulation with delays. Each stage i has a clock feeder (CF) that drives
// the stage input node D_i and a gated delay element (DE, two cascaded
// inverters, non-inverting) from D_i to D_i+1. While FREF is low every CF
// presets its node high; with ek[i]=1 the CF pulls D_i low when FREF rises,
// with ek[i]=0 D_i follows the previous stage (D_0 is tied high). A DE with
// eb[i]=0 is switched off and keeps its output high. An output inverter
// turns the falling edge at the end of the line into the rising FREF_DLY.
//
// Timing: FREF rising to FREF_DLY rising = CF_PS + (N_STAGES-i)*UNIT_PS +
// OUT_PS for feed-in stage i. The stage structure and the 22.3 ps unit
// delay follow the design; CF_PS and OUT_PS are assumed values. Stages are
// identical except that MID_EXTRA_PS (default 0) can be added to the delay
// element of stage N_STAGES/2-1, which the edge first passes at code
// N_STAGES/2: a simple stand-in for the longer wiring of the middle stages
// that shows up as a DNL peak in the middle of the code range. Random
// stage-to-stage mismatch is not modelled.
`timescale 1ps/1fs
module dtc_core #(
  parameter int  N_STAGES = dtc_pkg::N_STAGES,
  parameter real UNIT_PS  = 22.3,
  parameter real CF_PS    = 30.0,
  parameter real OUT_PS   = 15.0,
  parameter real MID_EXTRA_PS = 0.0
) (
  input  logic                fref,
  input  logic [N_STAGES-1:0] ek,
  input  logic [N_STAGES-1:0] eb,
  output logic                fref_dly
);
  logic [N_STAGES-1:0] node;    // D_i: input node of stage i
  logic [N_STAGES-1:0] de_out;  // output of the delay element of stage i
  logic                fed;     // FREF inverted by a clock feeder

  // clock feeder pull-down path, shared timing for whichever stage is fed
  assign #(CF_PS) fed = ~fref;

  generate
    for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
      logic prev;
      if (i == 0) begin : g_first
        assign prev = 1'b1;                 // first stage input tied to VDD
      end else begin : g_next
        assign prev = de_out[i-1];
      end
      // selected CF feeds FREF in; otherwise the node follows the previous
      // stage without extra delay, preset high while FREF is low
      assign node[i] = ek[i] ? fed : (fref ? prev : 1'b1);
      // gated delay element (off: output held high)
      localparam real DE_PS = (i == N_STAGES/2 - 1) ? UNIT_PS + MID_EXTRA_PS : UNIT_PS;
      assign #(DE_PS) de_out[i] = eb[i] ? node[i] : 1'b1;
    end
  endgenerate

  assign #(OUT_PS) fref_dly = ~de_out[N_STAGES-1];
endmodule
