// tb_dtc_core: delay transfer of the DTC delay-line model. For every feed-in
// stage it raises FREF and times the rising edge of FREF_DLY, which must come
// CF_PS + (64-i)*UNIT_PS + OUT_PS later; it also checks that FREF_DLY returns
// low after FREF falls and that the delay step per code is one unit delay.
`timescale 1ps/1fs
module tb_dtc_core;
  localparam real UNIT = 22.3, CF = 30.0, OUT = 15.0;
  logic        fref = 1'b0;
  logic [63:0] ek, eb;
  logic        fref_dly;
  int checks = 0, failures = 0;
  realtime t0, t1, prev_dly;

  dtc_core dut (.fref, .ek, .eb, .fref_dly);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(real a, real b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  initial begin
    real dly, exp_dly;
    prev_dly = 0.0;
    for (int i = 63; i >= 0; i--) begin
      fref = 1'b0;
      ek = 64'd1 << i;
      eb = ~((64'd1 << i) - 64'd1);
      #5000;
      checks++;
      if (fref_dly !== 1'b0) begin failures++; $display("stage %0d: output not low at rest", i); end
      t0 = $realtime;
      fref = 1'b1;
      @(posedge fref_dly);
      t1 = $realtime;
      dly = t1 - t0;
      exp_dly = CF + real'(64 - i) * UNIT + OUT;
      checks++;
      if (!near(dly, exp_dly)) begin
        failures++;
        $display("stage %0d: delay %f exp %f", i, dly, exp_dly);
      end
      if (i < 63) begin
        checks++;
        if (!near(dly - prev_dly, UNIT)) begin failures++; $display("stage %0d: step %f", i, dly - prev_dly); end
      end
      prev_dly = dly;
      #5000;
      fref = 1'b0;
      #5000;
      checks++;
      if (fref_dly !== 1'b0) begin failures++; $display("stage %0d: output stuck high", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
