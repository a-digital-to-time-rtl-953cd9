// phase_error: phase error adder, PHE = PHR_I - PHV - PHF.
//
// Combinational. The integer reference phase PHR_I, the captured CKV/2
// count PHV and the TDC fraction PHF are combined in INT_W.FRAC_W fixed
// point, modulo 2**INT_W periods; phe is two's complement. phe_f is the
// fractional part of PHE read as a signed fraction in [-0.5, 0.5), whose
// sign drives the gain calibration. The signs of the sum follow the design;
// the widths and the signed reading of PHE_F are this implementation's.
`timescale 1ps/1fs
module phase_error #(
  parameter int INT_W  = dtc_pkg::INT_W,
  parameter int FRAC_W = dtc_pkg::FRAC_W
) (
  input  logic [INT_W-1:0]        phr_i,
  input  logic [INT_W-1:0]        phv,
  input  logic [FRAC_W-1:0]       phf,
  output logic [INT_W+FRAC_W-1:0] phe,
  output logic [FRAC_W-1:0]       phe_f
);
  always_comb begin
    phe   = {phr_i, {FRAC_W{1'b0}}} - {phv, {FRAC_W{1'b0}}}
          - {{INT_W{1'b0}}, phf};
    phe_f = phe[FRAC_W-1:0];
  end
endmodule
