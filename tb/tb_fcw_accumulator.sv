// tb_fcw_accumulator: the reference phase must advance by FCW on every clock
// with en high, wrap modulo 2^20, hold with en low, and phr_next must always
// be phr + FCW. Compared against an independent running sum.
`timescale 1ps/1fs
module tb_fcw_accumulator;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [19:0] fcw = '0, phr, phr_next;
  longint model = 0;
  int checks = 0, failures = 0;

  fcw_accumulator dut (.clk, .rst_n, .en, .fcw, .phr, .phr_next);

  always #5000 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wraps = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (phr !== '0) begin failures++; $display("reset value %h", phr); end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      fcw = (k < 1000) ? 20'h26_01D : 20'($urandom);   // 38.007 then random
      en  = ($urandom_range(0, 7) != 0);
      #1;
      checks++;
      if (phr_next !== 20'(longint'(phr) + longint'(fcw))) begin
        failures++; $display("phr_next %h for phr %h fcw %h", phr_next, phr, fcw);
      end
      @(posedge clk);
      if (en) begin
        if (model + longint'(fcw) >= (64'd1 << 20)) wraps++;
        model = (model + longint'(fcw)) % (64'd1 << 20);
      end
      #1;
      checks++;
      if (longint'(phr) != model) begin failures++; $display("cycle %0d: phr %h exp %h", k, phr, model); end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
