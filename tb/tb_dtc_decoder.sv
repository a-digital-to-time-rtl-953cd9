// tb_dtc_decoder: exhaustive check of the DTC decoder. For every code d the
// feed-in select must be one-hot at stage 63-d and the delay-element enables
// must cover exactly the stages from there to the end of the line.
`timescale 1ps/1fs
module tb_dtc_decoder;
  logic [5:0]  dtc_ctrl;
  logic [63:0] ek, eb;
  int checks = 0, failures = 0;

  dtc_decoder dut (.dtc_ctrl, .ek, .eb);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp_ek, exp_eb;
    int enabled;
    for (int d = 0; d < 64; d++) begin
      dtc_ctrl = 6'(d);
      #10;
      exp_ek = 64'd1 << (63 - d);
      exp_eb = ~((64'd1 << (63 - d)) - 64'd1);
      checks++;
      if (ek !== exp_ek) begin failures++; $display("code %0d: ek=%h exp %h", d, ek, exp_ek); end
      checks++;
      if (eb !== exp_eb) begin failures++; $display("code %0d: eb=%h exp %h", d, eb, exp_eb); end
      // number of enabled delay elements is the code plus the feed-in stage
      enabled = $countones(eb);
      checks++;
      if (enabled != d + 1) begin failures++; $display("code %0d: %0d DEs on", d, enabled); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
