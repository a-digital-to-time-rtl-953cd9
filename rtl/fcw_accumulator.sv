// fcw_accumulator: reference phase accumulator (PHR).
//
// Adds the frequency command word FCW to the reference phase PHR once per
// reference clock cycle while en is high. PHR is unsigned fixed point in
// CKV/2 periods: the top INT_W bits are the integer part PHR_I (wrapping),
// the low FRAC_W bits the fractional part PHR_F. phr is the phase of the
// FREF edge now being processed, phr_next the phase of the next one (used to
// prepare the next DTC code a cycle ahead). Reset clears PHR; widths and
// reset value are this implementation's choice.
`timescale 1ps/1fs
module fcw_accumulator #(
  parameter int INT_W  = dtc_pkg::INT_W,
  parameter int FRAC_W = dtc_pkg::FRAC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [INT_W+FRAC_W-1:0] fcw,
  output logic [INT_W+FRAC_W-1:0] phr,
  output logic [INT_W+FRAC_W-1:0] phr_next
);
  assign phr_next = phr + fcw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  phr <= '0;
    else if (en) phr <= phr_next;
  end
endmodule
