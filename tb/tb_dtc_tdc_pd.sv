// tb_dtc_tdc_pd: end-to-end test of the DTC-assisted phase detector with
// its gain calibration, at the default parameters.
//
// FREF runs at 32 MHz; ckr is FREF inverted. CKV/2 runs at FCW times FREF
// (FCW = 38 + 29/4096, a 2.432 GHz carrier divided by two), and the
// testbench closes a simple proportional phase loop around the block, as
// the DCO and loop filter of a locked PLL would: each reference cycle it
// shifts the CKV/2 edges by -KP * PHE_F periods. The DTC's true step is
// 22.3 ps, so the right 1/K_DTC is R = T(CKV/2) / 22.3 ps = 36.87.
//
// Phases: (A) 1/K_DTC loaded 20 % low, calibration off: the loop locks and
// PHE keeps a saw-tooth that follows PHR_F; (B) calibration on: 1/K_DTC
// must rise to R and the saw-tooth vanish; (C) 1/K_DTC loaded high: it must
// fall back to R. Every reference cycle it also checks the DTC code against
// round((1-PHR_F)*1/K_DTC) from its own phase accumulator, the FREF to
// FREF_DLY delay against the code, and PHF against the CKV/2 phase it
// generated. Counted mechanisms: code near 0 and near full range, PHR_F
// wrap, PHV wrap, calibration rising, falling and held, load.
`timescale 1ps/1fs
module tb_dtc_tdc_pd;
  localparam real        TR   = 31250.0;                    // 32 MHz
  localparam logic [19:0] FCW = 20'h2601D;                  // 38 + 29/4096
  localparam real        TV   = TR * 4096.0 / real'(FCW);   // CKV/2 period
  localparam real        R    = TV / 22.3;
  localparam real        KP   = 0.05;

  logic fref = 1'b0, ckr, ckv2 = 1'b0, rst_n = 1'b1;
  logic cal_en = 1'b0, invk_load = 1'b0;
  logic [13:0] invk_init = '0;
  logic [5:0]  dtc_ctrl;
  logic        fref_dly;
  logic [11:0] phf;
  logic [19:0] phe;
  logic [13:0] invk;

  assign ckr = ~fref;

  dtc_tdc_pd dut (.ckr, .rst_n, .fref, .ckv2, .fcw(FCW), .cal_en, .invk_load,
                  .invk_init, .dtc_ctrl, .fref_dly, .phf, .phe, .invk);

  int checks = 0, failures = 0;
  int cycle = 0;
  // mechanism counters
  int n_code_low = 0, n_code_high = 0, n_phrf_wrap = 0, n_phv_wrap = 0;
  int n_cal_up = 0, n_cal_down = 0, n_cal_hold = 0, n_load = 0;

  // ---------------- clocks -------------------------------------------------
  always #(TR/2.0) fref = ~fref;

  real     adj = 0.0;        // pending CKV/2 phase shift, ps
  realtime last_edge = 0.0;  // last CKV/2 rising edge
  initial begin
    real a;
    #(137.0);
    forever begin
      ckv2 = 1'b1;
      last_edge = $realtime;
      #(TV/2.0) ckv2 = 1'b0;
      a   = adj;                  // take the pending shift once
      adj = 0.0;
      #(TV/2.0 + a);
    end
  end

  initial begin
    #(TR * 16000.0);
    failures++;
    $display("watchdog expired at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- independent model of PHR and the DTC code -------------
  longint  model_phr = 0;
  int      exp_code = 0;
  bit      code_valid = 1'b0;
  realtime t_fref = 0.0;
  logic [7:0] last_phv = '0;
  logic [13:0] last_invk = '0;
  // PHE statistics against PHR_F - 0.5
  real sxy, sxx, syy;
  int  nstat;
  bit  stat_on = 1'b0;

  function automatic real frac_of(longint p);
    return real'(p % 4096) / 4096.0;
  endfunction

  always @(posedge fref) t_fref = $realtime;

  always @(posedge fref_dly) begin
    real dly, exp_dly, ph, got, d;
    dly = $realtime - t_fref;
    ph  = ($realtime - last_edge) / TV;
    #1;
    if (code_valid && rst_n) begin
      checks++;
      if (int'(dtc_ctrl) != exp_code) begin
        failures++; $display("cycle %0d: code %0d exp %0d", cycle, dtc_ctrl, exp_code);
      end
      exp_dly = 30.0 + real'(int'(dtc_ctrl) + 1) * 22.3 + 15.0;
      checks++;
      if (dly - exp_dly > 0.01 || exp_dly - dly > 0.01) begin
        failures++; $display("cycle %0d: delay %f exp %f", cycle, dly, exp_dly);
      end
      got = real'(phf) / 4096.0;
      d = got - ph;
      d = d - $floor(d + 0.5);
      checks++;
      if (d > 0.06 || d < -0.06) begin
        failures++; $display("cycle %0d: phf %f, CKV/2 phase %f", cycle, got, ph);
      end
      if (dtc_ctrl < 6'd4) n_code_low++;
      if (real'(dtc_ctrl) > R - 4.0) n_code_high++;
    end
  end

  always @(posedge ckr) begin
    real pe, x;
    if (rst_n) begin
      cycle++;
      // PHE of the edge just measured, paired with the PHR_F that set it
      pe = real'($signed(phe[11:0])) / 4096.0;
      x  = frac_of(model_phr) - 0.5;
      if (stat_on) begin
        sxy += x * pe; sxx += x * x; syy += pe * pe; nstat++;
      end
      adj = -KP * pe * TV;                  // emulated locked loop
      if (dut.phv < last_phv) n_phv_wrap++;
      last_phv = dut.phv;
      // counters for the calibration (invk before this edge's update)
      last_invk = invk;
      // next reference phase and its DTC code, with the 1/K_DTC in use now
      if ((model_phr % 4096) + longint'(FCW % 4096) >= 4096) n_phrf_wrap++;
      model_phr = (model_phr + longint'(FCW)) % (longint'(1) << 20);
      begin
        real v;
        v = (1.0 - frac_of(model_phr)) * real'(invk) / 256.0;
        v = $floor(v + 0.5);
        exp_code = (v > 63.0) ? 63 : int'(v);
      end
      code_valid = 1'b1;
      #1;
      if (invk > last_invk) n_cal_up++;
      else if (invk < last_invk) n_cal_down++;
      else if (!cal_en && !invk_load) n_cal_hold++;
      if (invk_load) n_load++;
    end
  end

  task automatic wait_cycles(int n);
    repeat (n) @(posedge fref);
  endtask

  task automatic stats_clear();
    sxy = 0.0; sxx = 0.0; syy = 0.0; nstat = 0;
  endtask

  // ---------------- sequence ----------------------------------------------
  initial begin
    real slope_pre, rms_pre, slope_post, rms_post, g;
    logic [13:0] held;
    @(posedge fref);
    #100 rst_n = 1'b0;
    wait_cycles(2);
    @(posedge fref); #100 rst_n = 1'b1;
    // (A) 20 % low, calibration off
    @(negedge fref); #100 invk_load = 1'b1; invk_init = 14'(30 * 256);
    @(negedge fref); #100 invk_load = 1'b0;
    wait_cycles(300);
    held = invk;
    stats_clear(); stat_on = 1'b1;
    wait_cycles(600);
    stat_on = 1'b0;
    slope_pre = sxy / sxx; rms_pre = $sqrt(syy / real'(nstat));
    $display("before calibration: 1/K_DTC %f, PHE slope vs PHR_F %f, PHE rms %f",
             real'(invk) / 256.0, slope_pre, rms_pre);
    checks++;
    if (invk !== held) begin failures++; $display("1/K_DTC moved with calibration off"); end
    checks++;
    if (slope_pre > -0.1) begin failures++; $display("no saw-tooth with a wrong gain"); end
    // (B) calibration on
    @(negedge fref); #100 cal_en = 1'b1;
    wait_cycles(5000);
    g = real'(invk) / 256.0;
    $display("after calibration from below: 1/K_DTC %f (R = %f)", g, R);
    checks++;
    if (g < R - 0.5 || g > R + 0.5) begin failures++; $display("did not converge"); end
    stats_clear(); stat_on = 1'b1;
    wait_cycles(600);
    stat_on = 1'b0;
    slope_post = sxy / sxx; rms_post = $sqrt(syy / real'(nstat));
    $display("after calibration: PHE slope %f, PHE rms %f", slope_post, rms_post);
    checks++;
    if (slope_post > 0.03 || slope_post < -0.03) begin failures++; $display("saw-tooth remains"); end
    checks++;
    if (rms_post > 0.5 * rms_pre) begin failures++; $display("PHE not reduced"); end
    // (C) start high
    @(negedge fref); #100 invk_load = 1'b1; invk_init = 14'(46 * 256);
    @(negedge fref); #100 invk_load = 1'b0;
    wait_cycles(5000);
    g = real'(invk) / 256.0;
    $display("after calibration from above: 1/K_DTC %f (R = %f)", g, R);
    checks++;
    if (g < R - 0.5 || g > R + 0.5) begin failures++; $display("did not converge from above"); end
    // mechanisms
    $display("mechanisms: code_low %0d code_high %0d phrf_wrap %0d phv_wrap %0d cal_up %0d cal_down %0d cal_hold %0d load %0d",
             n_code_low, n_code_high, n_phrf_wrap, n_phv_wrap, n_cal_up, n_cal_down, n_cal_hold, n_load);
    checks++; if (n_code_low  == 0) begin failures++; $display("code near 0 never used"); end
    checks++; if (n_code_high == 0) begin failures++; $display("code near R never used"); end
    checks++; if (n_phrf_wrap == 0) begin failures++; $display("PHR_F never wrapped"); end
    checks++; if (n_phv_wrap  == 0) begin failures++; $display("PHV never wrapped"); end
    checks++; if (n_cal_up    == 0) begin failures++; $display("1/K_DTC never rose"); end
    checks++; if (n_cal_down  == 0) begin failures++; $display("1/K_DTC never fell"); end
    checks++; if (n_cal_hold  == 0) begin failures++; $display("1/K_DTC never held"); end
    checks++; if (n_load      == 0) begin failures++; $display("no load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
