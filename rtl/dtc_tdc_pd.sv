// dtc_tdc_pd: DTC-assisted phase detector with background DTC gain
// calibration, the reference-phase front end of an all-digital PLL.
//
// Per reference edge k: the reference phase PHR = PHR_I.PHR_F advances by
// FCW; the phase prediction sets the DTC to delay FREF by (1 - PHR_F) CKV/2
// periods, i.e. DTC_ctrl = (1 - PHR_F) * 1/K_DTC, so the delayed edge
// FREF_DLY lands at a nearly constant phase of CKV/2 and the TDC only has to
// cover a small residue. At FREF_DLY the TDC gives the fraction PHF and the
// CKV/2 counter is captured as PHV; the phase error is
// PHE = PHR_I - PHV - PHF. If 1/K_DTC is wrong, PHE carries a saw-tooth
// that follows PHR_F; the calibration correlates the sign of PHE's fraction
// with PHR_F - 0.5 and steers 1/K_DTC until the saw-tooth is gone.
//
// Clocking: the digital part runs on ckr, a retimed reference clock that
// must rise after the TDC result of a FREF edge is in and early enough that
// the next DTC code settles before the next FREF rising edge (for example
// the falling edge of a 50 % FREF). On each ckr edge PHE of the edge just
// measured updates the calibration, PHR advances, and the code for the next
// edge is registered. dtc_core and tdc are behavioural timing models of the
// analog parts; everything else is synthesizable. The DCO and loop filter
// that would close the PLL are outside this block: phe is its output.
// The loop structure and signs follow the design; the clocking scheme, word
// widths and the calibration constants are this implementation's choices.
`timescale 1ps/1fs
module dtc_tdc_pd #(
  parameter int  INT_W       = dtc_pkg::INT_W,
  parameter int  FRAC_W      = dtc_pkg::FRAC_W,
  parameter int  CTRL_W      = dtc_pkg::CTRL_W,
  parameter int  N_STAGES    = 2**CTRL_W,
  parameter int  INVK_FRAC   = dtc_pkg::INVK_FRAC,
  parameter int  IIR_A       = 4,
  parameter int  IIR_B       = 2,
  parameter int  MU_SHIFT    = 8,
  parameter real DTC_UNIT_PS = 22.3,
  parameter real TDC_RES_PS  = 22.0
) (
  input  logic                        ckr,
  input  logic                        rst_n,
  input  logic                        fref,
  input  logic                        ckv2,
  input  logic [INT_W+FRAC_W-1:0]     fcw,
  input  logic                        cal_en,
  input  logic                        invk_load,
  input  logic [CTRL_W+INVK_FRAC-1:0] invk_init,
  output logic [CTRL_W-1:0]           dtc_ctrl,
  output logic                        fref_dly,
  output logic [FRAC_W-1:0]           phf,
  output logic [INT_W+FRAC_W-1:0]     phe,
  output logic [CTRL_W+INVK_FRAC-1:0] invk
);
  logic [INT_W+FRAC_W-1:0] phr, phr_next;
  logic [N_STAGES-1:0]     ek, eb;
  logic [INT_W-1:0]        phv;
  logic [FRAC_W-1:0]       phe_f;
  logic signed [31:0]      epsilon;

  fcw_accumulator #(.INT_W(INT_W), .FRAC_W(FRAC_W)) u_phr (
    .clk(ckr), .rst_n, .en(1'b1), .fcw, .phr, .phr_next);

  phase_prediction #(.FRAC_W(FRAC_W), .CTRL_W(CTRL_W), .INVK_FRAC(INVK_FRAC)) u_pred (
    .clk(ckr), .rst_n, .en(1'b1), .phr_f(phr_next[FRAC_W-1:0]), .invk, .dtc_ctrl);

  dtc_decoder #(.CTRL_W(CTRL_W), .N_STAGES(N_STAGES)) u_dec (
    .dtc_ctrl, .ek, .eb);

  dtc_core #(.N_STAGES(N_STAGES), .UNIT_PS(DTC_UNIT_PS)) u_dtc (
    .fref, .ek, .eb, .fref_dly);

  tdc #(.FRAC_W(FRAC_W), .RES_PS(TDC_RES_PS)) u_tdc (
    .ckv2, .fref_dly, .phf);

  ckv_counter #(.INT_W(INT_W)) u_phv (
    .ckv2, .sample(fref_dly), .rst_n, .phv);

  phase_error #(.INT_W(INT_W), .FRAC_W(FRAC_W)) u_phe (
    .phr_i(phr[INT_W+FRAC_W-1:FRAC_W]), .phv, .phf, .phe, .phe_f);

  kdtc_cal #(.FRAC_W(FRAC_W), .CTRL_W(CTRL_W), .INVK_FRAC(INVK_FRAC),
             .IIR_A(IIR_A), .IIR_B(IIR_B), .MU_SHIFT(MU_SHIFT)) u_cal (
    .clk(ckr), .rst_n, .en(cal_en), .load(invk_load), .invk_init,
    .phr_f(phr[FRAC_W-1:0]), .phe_f, .epsilon, .invk);
endmodule
