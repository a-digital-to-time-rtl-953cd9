// tb_kdtc_cal: the gain calibration, in two parts.
// 1) Arithmetic: for random PHR_F and PHE_F, epsilon and 1/K_DTC must follow
//    e = (PHR_F-0.5)*Sign(PHE_F), eps = -e/4 + (1-1/16)*eps_prev,
//    acc += eps/256 (all divisions rounding towards minus infinity),
//    computed here in 64-bit integers; load and en low are checked too.
// 2) Convergence: PHE_F is generated as a DTC with true ratio R would leave
//    it, (0.5 - PHR_F)*(1 - invk/R) plus noise; starting below and above R,
//    1/K_DTC must settle within 0.5 of R.
`timescale 1ps/1fs
module tb_kdtc_cal;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, load = 1'b0;
  logic [13:0] invk_init = '0;
  logic [11:0] phr_f = '0, phe_f = '0;
  logic signed [31:0] epsilon;
  logic [13:0] invk;
  int checks = 0, failures = 0;

  kdtc_cal dut (.clk, .rst_n, .en, .load, .invk_init, .phr_f, .phe_f, .epsilon, .invk);

  always #5000 clk = ~clk;

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fdiv(longint a, int k);   // floor(a / 2^k)
    longint d = longint'(1) << k;
    return (a >= 0) ? a / d : -((-a + d - 1) / d);
  endfunction

  task automatic run_to(real r, real start, int cycles);
    real g, pe;
    int  q;
    @(negedge clk);
    load = 1'b1; invk_init = 14'(int'(start * 256.0)); en = 1'b0;
    @(negedge clk);
    load = 1'b0; en = 1'b1;
    for (int k = 0; k < cycles; k++) begin
      phr_f = 12'($urandom);
      g  = (real'(invk) / 256.0) / r;
      pe = (0.5 - real'(phr_f) / 4096.0) * (1.0 - g)
         + (real'($urandom_range(0, 200)) - 100.0) / 8192.0;   // +-0.012 noise
      q  = int'($floor(pe * 4096.0));
      phe_f = 12'(q);
      @(negedge clk);
    end
    en = 1'b0;
    checks++;
    g = real'(invk) / 256.0;
    if (g < r - 0.5 || g > r + 0.5) begin
      failures++; $display("start %f: settled at %f, want %f", start, g, r);
    end else $display("start %f: settled at %f (R = %f)", start, g, r);
  endtask

  initial begin
    longint y = 0, acc, e, x, eps, sum;
    int sgn;
    #12000 rst_n = 1'b1;
    acc = longint'(1) << 29;          // reset value: 32.0
    checks++;
    if (invk !== 14'(32 * 256)) begin failures++; $display("reset invk %0d", invk); end
    // part 1
    @(negedge clk);
    load = 1'b1; invk_init = 14'(30 * 256 + 77);
    @(negedge clk);
    load = 1'b0;
    acc = longint'(30 * 256 + 77) << 16; y = 0;
    checks++;
    if (invk !== 14'(30 * 256 + 77)) begin failures++; $display("load failed: %0d", invk); end
    for (int k = 0; k < 4000; k++) begin
      phr_f = 12'($urandom);
      phe_f = (k % 7 == 0) ? 12'd0 : 12'($urandom);
      en = ($urandom_range(0, 9) != 0);
      #1;
      sgn = (phe_f == 0) ? 0 : (phe_f[11] ? -1 : 1);
      e   = longint'(sgn) * (longint'(phr_f) - 2048);
      x   = fdiv(-(e * 4096), 2);
      eps = x + y - fdiv(y, 4);
      checks++;
      if (longint'(epsilon) != eps) begin failures++; $display("cycle %0d: eps %0d exp %0d", k, epsilon, eps); end
      @(negedge clk);
      if (en) begin
        y = eps;
        sum = acc + fdiv(eps, 8);
        acc = (sum < 0) ? 0 : (sum >= (longint'(1) << 30)) ? (longint'(1) << 30) - 1 : sum;
      end
      checks++;
      if (longint'(invk) != fdiv(acc, 16)) begin failures++; $display("cycle %0d: invk %0d exp %0d", k, invk, fdiv(acc, 16)); end
    end
    // part 2
    run_to(36.87, 28.0, 6000);
    run_to(36.87, 48.0, 6000);
    run_to(25.0, 36.0, 6000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
