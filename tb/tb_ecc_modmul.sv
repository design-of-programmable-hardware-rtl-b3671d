// tb_ecc_modmul: random products a*b mod p for several odd moduli (17-bit
// multiplier), compared with 64-bit integer arithmetic; checks the
// WIDTH+1 cycle latency.
module tb_ecc_modmul;
  localparam int W = 17;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [W-1:0] a, b, p, r;
  int checks = 0, failures = 0;
  ecc_modmul #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    longint pm [4] = '{65521, 131071, 3, 100003};
    a = 0; b = 0; p = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    foreach (pm[j]) for (int i = 0; i < 60; i++) begin
      longint av, bv, e; int cyc;
      p  = W'(pm[j]);
      av = (i == 0) ? pm[j] - 1 : longint'($urandom) % pm[j];
      bv = (i == 0) ? pm[j] - 1 : longint'($urandom) % pm[j];
      a = W'(av); b = W'(bv); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      e = (av * bv) % pm[j];
      checks += 2;
      if (r != W'(e)) begin failures++; $display("FAIL %0d*%0d mod %0d = %0d exp %0d", av, bv, pm[j], r, e); end
      if (cyc != W + 1) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
