// phase_prediction: DTC code from the predicted reference phase.
//
// Computes DTC_ctrl = (1 - PHR_F) * (1/K_DTC), where PHR_F is the fractional
// reference phase (FRAC_W bits) and 1/K_DTC the number of DTC steps in one
// CKV/2 period (CTRL_W integer, INVK_FRAC fractional bits). The DTC thereby
// delays FREF by the fraction of a CKV/2 period that is left until the next
// CKV/2 edge. The product is rounded to the nearest code and limited to
// 2**CTRL_W-1, and registered on clk when en is high, so the code is steady
// before the FREF edge it serves (one cycle latency). Rounding, saturation
// and the output register are this implementation's choices.
`timescale 1ps/1fs
module phase_prediction #(
  parameter int FRAC_W    = dtc_pkg::FRAC_W,
  parameter int CTRL_W    = dtc_pkg::CTRL_W,
  parameter int INVK_FRAC = dtc_pkg::INVK_FRAC
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic [FRAC_W-1:0]           phr_f,
  input  logic [CTRL_W+INVK_FRAC-1:0] invk,
  output logic [CTRL_W-1:0]           dtc_ctrl
);
  localparam int F   = FRAC_W + INVK_FRAC;        // fraction bits of product
  localparam int P_W = FRAC_W + 1 + CTRL_W + INVK_FRAC;

  logic [FRAC_W:0]     one_minus;  // 1 - PHR_F, in (0, 1]
  logic [P_W-1:0]      prod;
  logic [P_W-F-1:0]    rounded;
  logic [CTRL_W-1:0]   code;

  always_comb begin
    one_minus = (FRAC_W+1)'(1 << FRAC_W) - {1'b0, phr_f};
    prod      = P_W'(one_minus) * P_W'(invk);
    rounded   = (P_W-F)'((prod + P_W'(1 << (F-1))) >> F);
    code      = (rounded > (P_W-F)'(2**CTRL_W - 1)) ? CTRL_W'(2**CTRL_W - 1)
                                                    : CTRL_W'(rounded);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  dtc_ctrl <= '0;
    else if (en) dtc_ctrl <= code;
  end
endmodule
