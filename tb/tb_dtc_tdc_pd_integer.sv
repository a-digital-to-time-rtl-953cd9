// tb_dtc_tdc_pd_integer: the phase detector at an integer channel
// (FCW = 38, CKV/2 = 1216 MHz from 32 MHz), the condition under which the
// in-band phase noise of the fabricated PLL was measured. PHR_F stays 0, so
// the DTC code must stay at round(1/K_DTC) on every edge, the delayed edge
// must keep a fixed place in the CKV/2 period, and with the phase loop
// locked (emulated by the testbench as in tb_dtc_tdc_pd) the phase error
// must stay within the TDC quantisation. Calibration is off, as it gets no
// information when PHR_F does not move; 1/K_DTC must hold.
`timescale 1ps/1fs
module tb_dtc_tdc_pd_integer;
  localparam real         TR  = 31250.0;
  localparam logic [19:0] FCW = 20'h26000;                  // 38.0
  localparam real         TV  = TR / 38.0;
  localparam real         KP  = 0.05;

  logic fref = 1'b0, ckr, ckv2 = 1'b0, rst_n = 1'b1;
  logic invk_load = 1'b0;
  logic [13:0] invk_init = '0;
  logic [5:0]  dtc_ctrl;
  logic        fref_dly;
  logic [11:0] phf;
  logic [19:0] phe;
  logic [13:0] invk;
  int checks = 0, failures = 0;
  int n_locked = 0;

  assign ckr = ~fref;

  dtc_tdc_pd dut (.ckr, .rst_n, .fref, .ckv2, .fcw(FCW), .cal_en(1'b0), .invk_load,
                  .invk_init, .dtc_ctrl, .fref_dly, .phf, .phe, .invk);

  always #(TR/2.0) fref = ~fref;

  real adj = 0.0;
  initial begin
    real a;
    #(411.0);
    forever begin
      ckv2 = 1'b1;
      #(TV/2.0) ckv2 = 1'b0;
      a   = adj;                  // take the pending shift once
      adj = 0.0;
      #(TV/2.0 + a);
    end
  end

  initial begin
    #(TR * 3000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit track = 1'b0;
  always @(posedge ckr) if (rst_n) begin
    real pe;
    pe  = real'($signed(phe[11:0])) / 4096.0;
    adj = -KP * pe * TV;
    if (track) begin
      checks++;
      if (dtc_ctrl != 6'd37) begin failures++; $display("code %0d, exp 37", dtc_ctrl); end
      checks++;
      if (invk != 14'(37 * 256 - 40)) begin failures++; $display("1/K_DTC moved: %0d", invk); end
      checks++;
      if (pe > 0.03 || pe < -0.03) begin failures++; $display("PHE_F %f", pe); end
      else n_locked++;
    end
  end

  initial begin
    @(posedge fref);
    #100 rst_n = 1'b0;
    repeat (2) @(posedge fref);
    #100 rst_n = 1'b1;
    @(negedge fref); #100 invk_load = 1'b1; invk_init = 14'(37 * 256 - 40);  // 36.84
    @(negedge fref); #100 invk_load = 1'b0;
    repeat (400) @(posedge fref);     // lock
    track = 1'b1;
    repeat (1000) @(posedge fref);
    track = 1'b0;
    checks++;
    if (n_locked == 0) begin failures++; $display("never locked"); end
    $display("locked cycles %0d", n_locked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
