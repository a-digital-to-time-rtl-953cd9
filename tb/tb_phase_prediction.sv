// tb_phase_prediction: DTC_ctrl must equal round((1 - PHR_F) * 1/K_DTC),
// limited to 63, one clock after the inputs are applied, and hold while en
// is low. Expected codes are computed in real arithmetic.
`timescale 1ps/1fs
module tb_phase_prediction;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [11:0] phr_f = '0;
  logic [13:0] invk = '0;
  logic [5:0]  dtc_ctrl;
  int checks = 0, failures = 0;

  phase_prediction dut (.clk, .rst_n, .en, .phr_f, .invk, .dtc_ctrl);

  always #5000 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(int f, int k);
    real v;
    v = (1.0 - real'(f) / 4096.0) * (real'(k) / 256.0);
    v = $floor(v + 0.5);
    return (v > 63.0) ? 63 : int'(v);
  endfunction

  initial begin
    int exp_code, sat = 0;
    logic [5:0] prev_code;
    #12000 rst_n = 1'b1;
    checks++;
    if (dtc_ctrl !== 6'd0) begin failures++; $display("reset value %0d", dtc_ctrl); end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      phr_f = 12'($urandom);
      invk  = (k < 2000) ? 14'(9000 + $urandom_range(0, 1000)) : 14'($urandom);
      if (k == 0) phr_f = 12'd0;          // 1 - PHR_F = 1 exactly
      if (k == 1 || k == 2500) begin      // product rounds to 64: must limit
        phr_f = 12'd0;
        invk  = 14'h3FFF;
      end
      en = 1'b1;
      exp_code = expected(int'(phr_f), int'(invk));
      if ((1.0 - real'(phr_f) / 4096.0) * (real'(invk) / 256.0) >= 63.5) sat++;
      @(posedge clk); #1;
      checks++;
      if (int'(dtc_ctrl) != exp_code) begin
        failures++;
        $display("phr_f %0d invk %0d: code %0d exp %0d", phr_f, invk, dtc_ctrl, exp_code);
      end
    end
    // hold
    @(negedge clk);
    en = 1'b0; prev_code = dtc_ctrl; phr_f = ~phr_f; invk = ~invk;
    @(posedge clk); #1;
    checks++;
    if (dtc_ctrl !== prev_code) begin failures++; $display("code changed with en low"); end
    checks++;
    if (sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
