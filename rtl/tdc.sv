// tdc: behavioural model of the time-to-digital converter (mixed-signal).
//
// Not synthesizable: a timing model for simulation. At each rising edge of
// FREF_DLY it measures the time elapsed since the last rising edge of CKV/2,
// quantises it to RES_PS steps (floor) and divides it by the most recent
// CKV/2 period, giving the fractional phase PHF in [0,1) with FRAC_W bits.
// PHF is updated at the FREF_DLY edge and held until the next one.
//
// Only the TDC's function, its place in the loop and its ~22 ps resolution
// follow the design; its circuit (a pseudo-differential, snapshot-based
// converter) is not modelled. Measuring back to the last CKV/2 edge, rather
// than forward to the next, is chosen to match the minus sign PHF carries in
// the phase error sum.
`timescale 1ps/1fs
module tdc #(
  parameter int  FRAC_W = dtc_pkg::FRAC_W,
  parameter real RES_PS = 22.0
) (
  input  logic              ckv2,
  input  logic              fref_dly,
  output logic [FRAC_W-1:0] phf
);
  realtime t_last;  // time of the last CKV/2 rising edge
  realtime t_prev;  // time of the one before

  initial begin
    t_last = 0.0;
    t_prev = 0.0;
    phf    = '0;
  end

  always @(posedge ckv2) begin
    t_prev <= t_last;
    t_last <= $realtime;
  end

  always @(posedge fref_dly) begin
    real tv, dt, frac;
    int  code, q;
    tv   = t_last - t_prev;
    dt   = $realtime - t_last;
    code = int'($floor(dt / RES_PS));
    if (tv > 0.0) begin
      frac = (real'(code) * RES_PS) / tv;
      q    = int'($floor(frac * real'(2**FRAC_W)));
      if (q > 2**FRAC_W - 1) q = 2**FRAC_W - 1;
      if (q < 0) q = 0;
      phf <= FRAC_W'(q);
    end
  end
endmodule
