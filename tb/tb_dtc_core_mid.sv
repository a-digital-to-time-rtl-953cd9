// tb_dtc_core_mid: DTC delay line with extra wiring delay in the middle of
// the line (MID_EXTRA_PS = 6.7 ps, 0.3 of a 22.3 ps step). Sweeps all codes
// through the decoder and computes DNL and INL from the end points; the
// DNL must be +0.3 LSB at code 32 and within +-0.02 LSB elsewhere, as in a
// layout where only the middle stages differ.
`timescale 1ps/1fs
module tb_dtc_core_mid;
  logic        fref = 1'b0;
  logic [5:0]  dtc_ctrl;
  logic [63:0] ek, eb;
  logic        fref_dly;
  int checks = 0, failures = 0;
  real dly [64];

  dtc_decoder u_dec (.dtc_ctrl, .ek, .eb);
  dtc_core #(.MID_EXTRA_PS(6.69)) dut (.fref, .ek, .eb, .fref_dly);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    real lsb, dnl, inl, max_inl;
    for (int d = 0; d < 64; d++) begin
      dtc_ctrl = 6'(d);
      #5000 t0 = $realtime;
      fref = 1'b1;
      @(posedge fref_dly);
      dly[d] = $realtime - t0;
      #5000 fref = 1'b0;
    end
    lsb = (dly[63] - dly[0]) / 63.0;
    max_inl = 0.0;
    for (int d = 1; d < 64; d++) begin
      dnl = (dly[d] - dly[d-1]) / lsb - 1.0;
      inl = (dly[d] - dly[0]) / lsb - real'(d);
      if (inl > max_inl) max_inl = inl;
      checks++;
      if (d == 32) begin
        if (dnl < 0.27 || dnl > 0.31) begin failures++; $display("code 32: DNL %f", dnl); end
      end else if (dnl > 0.02 || dnl < -0.02) begin
        failures++; $display("code %0d: DNL %f", d, dnl);
      end
    end
    $display("DTC with mid-line extra delay: LSB %f ps, peak INL %f LSB", lsb, max_inl);
    checks++;
    if (max_inl < 0.1) begin failures++; $display("no INL step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
