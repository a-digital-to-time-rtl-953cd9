// kdtc_cal: background calibration of the DTC gain, 1/K_DTC.
//
// A sign-sign LMS loop in three parts, one update per reference cycle (clk)
// while en is high:
//   error   e   = (PHR_F - 0.5) * Sign(PHE_F)       Sign(0) = 0
//   IIR     eps = -2^-IIR_B * e + (1 - 2^-IIR_A) * eps_prev
//   accum   1/K_DTC <= 1/K_DTC + 2^-MU_SHIFT * eps
// If 1/K_DTC is too small, the phase error left by the DTC falls as PHR_F
// rises, so e is negative on average and the estimate grows; when it is too
// large the opposite happens; at the right value e averages to zero.
//
// Internals carry FRAC_W+GUARD fractional bits in 32-bit signed words.
// epsilon is the IIR adder output (combinational), the IIR register holds
// its previous value; invk is the accumulator register, saturated to
// [0, 2**CTRL_W) and output with INVK_FRAC fractional bits. load (synchronous,
// over en) sets the estimate to invk_init and clears the IIR. The structure
// (error, IIR, accumulator, the 0.5 offset and the signs) follows the
// design; the values of a, b and mu, Sign(0)=0, the word widths and the
// saturation are this implementation's choices.
`timescale 1ps/1fs
module kdtc_cal #(
  parameter int FRAC_W    = dtc_pkg::FRAC_W,
  parameter int CTRL_W    = dtc_pkg::CTRL_W,
  parameter int INVK_FRAC = dtc_pkg::INVK_FRAC,
  parameter int IIR_A     = 4,
  parameter int IIR_B     = 2,
  parameter int MU_SHIFT  = 8,
  parameter int GUARD     = 12
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic                        load,
  input  logic [CTRL_W+INVK_FRAC-1:0] invk_init,
  input  logic [FRAC_W-1:0]           phr_f,
  input  logic [FRAC_W-1:0]           phe_f,
  output logic signed [31:0]          epsilon,
  output logic [CTRL_W+INVK_FRAC-1:0] invk
);
  localparam int IF = FRAC_W + GUARD;            // internal fraction bits
  localparam logic signed [31:0] ACC_MAX = 32'sd1 <<< (CTRL_W + IF);

  logic signed [FRAC_W:0] centred;   // PHR_F - 0.5
  logic signed [FRAC_W:0] e;         // error after Sign(PHE_F)
  logic signed [31:0]     x;         // -2^-b * e
  logic signed [31:0]     y;         // IIR state
  logic signed [31:0]     acc;       // 1/K_DTC, IF fraction bits
  logic signed [31:0]     acc_sum;
  logic signed [31:0]     acc_new;

  always_comb begin
    centred = $signed({1'b0, phr_f}) - $signed((FRAC_W+1)'(1 << (FRAC_W-1)));
    if (phe_f == '0)           e = '0;
    else if (phe_f[FRAC_W-1])  e = -centred;
    else                       e = centred;
    x       = -((32'(e)) <<< GUARD) >>> IIR_B;
    epsilon = x + y - (y >>> IIR_A);
    acc_sum = acc + (epsilon >>> MU_SHIFT);
    if (acc_sum < 0)             acc_new = '0;
    else if (acc_sum >= ACC_MAX) acc_new = ACC_MAX - 1;
    else                         acc_new = acc_sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y   <= '0;
      acc <= 32'sd1 <<< (CTRL_W - 1 + IF);        // mid range
    end else if (load) begin
      y   <= '0;
      acc <= 32'($unsigned(invk_init)) <<< (IF - INVK_FRAC);
    end else if (en) begin
      y   <= epsilon;
      acc <= acc_new;
    end
  end

  assign invk = (CTRL_W+INVK_FRAC)'(acc >>> (IF - INVK_FRAC));
endmodule
