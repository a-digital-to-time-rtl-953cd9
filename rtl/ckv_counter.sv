// ckv_counter: variable phase accumulator (PHV).
//
// Counts the rising edges of CKV/2 in a free-running INT_W-bit counter and
// captures the count at each rising edge of the sample clock (FREF_DLY, the
// same event at which the TDC measures), so that PHV and PHF describe the
// same instant: PHV + PHF is the CKV/2 phase at the delayed reference edge.
// Both registers reset to zero. The counter follows the design; the capture
// point and widths are this implementation's choice.
`timescale 1ps/1fs
module ckv_counter #(
  parameter int INT_W = dtc_pkg::INT_W
) (
  input  logic             ckv2,
  input  logic             sample,
  input  logic             rst_n,
  output logic [INT_W-1:0] phv
);
  logic [INT_W-1:0] cnt;

  always_ff @(posedge ckv2 or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  always_ff @(posedge sample or negedge rst_n) begin
    if (!rst_n) phv <= '0;
    else        phv <= cnt;
  end
endmodule
