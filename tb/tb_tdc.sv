// tb_tdc: fractional phase measurement of the TDC model. CKV/2 runs at a
// fixed period; FREF_DLY is fired at chosen offsets after a CKV/2 rising
// edge, and PHF must equal (to one LSB of rounding) floor(floor(offset/22 ps)*22 ps/period*2^12).
`timescale 1ps/1fs
module tb_tdc;
  localparam real TV = 822.2, RES = 22.0;
  logic ckv2 = 1'b0, fref_dly = 1'b0;
  logic [11:0] phf;
  int checks = 0, failures = 0;

  tdc dut (.ckv2, .fref_dly, .phf);

  always begin
    #(TV/2.0) ckv2 = 1'b1;
    #(TV/2.0) ckv2 = 1'b0;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real off;
    int  exp_q;
    repeat (3) @(posedge ckv2);
    for (int k = 0; k < 200; k++) begin
      off = 3.05 + real'($urandom_range(0, 8000)) / 10.0;  // never a multiple of 22 ps
      @(posedge ckv2);
      #(off) fref_dly = 1'b1;
      #1 fref_dly = 1'b0;
      exp_q = int'($floor(real'(int'($floor(off / RES))) * RES / TV * 4096.0));
      checks++;
      if (int'(phf) > exp_q + 1 || int'(phf) < exp_q - 1) begin
        failures++;
        $display("offset %f: phf=%0d exp %0d", off, phf, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
