// tb_phase_error: PHE = PHR_I - PHV - PHF modulo 256 periods, checked for
// random inputs against a real-valued computation; PHE_F must be the signed
// fraction of PHE in [-0.5, 0.5).
`timescale 1ps/1fs
module tb_phase_error;
  logic [7:0]  phr_i, phv;
  logic [11:0] phf;
  logic [19:0] phe;
  logic [11:0] phe_f;
  int checks = 0, failures = 0;

  phase_error dut (.phr_i, .phv, .phf, .phe, .phe_f);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v, fr, got_fr;
    longint exp_phe;
    for (int k = 0; k < 5000; k++) begin
      phr_i = 8'($urandom); phv = 8'($urandom); phf = 12'($urandom);
      #10;
      v = real'(phr_i) - real'(phv) - real'(phf) / 4096.0;      // in periods
      while (v < 0.0)    v += 256.0;
      while (v >= 256.0) v -= 256.0;
      exp_phe = longint'(v * 4096.0);
      checks++;
      if (longint'(phe) != exp_phe) begin failures++; $display("phe %h exp %h", phe, exp_phe); end
      fr = v - $floor(v);
      if (fr >= 0.5) fr -= 1.0;
      got_fr = real'($signed(phe_f)) / 4096.0;
      checks++;
      if (got_fr != fr) begin failures++; $display("phe_f %f exp %f", got_fr, fr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
