// tb_ckv_counter: after reset, a random number of CKV/2 edges is sent
// between sample edges; the captured PHV must equal the total edge count
// modulo 256 and must not change between sample edges.
`timescale 1ps/1fs
module tb_ckv_counter;
  logic ckv2 = 1'b0, sample = 1'b0, rst_n = 1'b1;
  logic [7:0] phv;
  int checks = 0, failures = 0;

  ckv_counter dut (.ckv2, .sample, .rst_n, .phv);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total = 0;
    int n;
    logic [7:0] held;
    #100 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    #1000;
    checks++;
    if (phv !== 8'd0) begin failures++; $display("reset value %0d", phv); end
    for (int k = 0; k < 100; k++) begin
      n = $urandom_range(0, 60);
      repeat (n) begin
        #400 ckv2 = 1'b1;
        #400 ckv2 = 1'b0;
      end
      total += n;
      held = phv;
      #100 sample = 1'b1;
      #100 sample = 1'b0;
      checks++;
      if (phv !== 8'(total)) begin failures++; $display("sample %0d: phv %0d exp %0d", k, phv, total % 256); end
      // count moves on, the captured value must not
      #400 ckv2 = 1'b1;
      #400 ckv2 = 1'b0;
      total++;
      checks++;
      if (phv !== 8'(total - 1)) begin failures++; $display("phv moved without sample (was %0d)", held); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
