// tb_ecc_modinv: inverts random nonzero values modulo several primes and
// checks a * r = 1 (mod p) and r < p with 64-bit arithmetic; a = 0 must
// give 0. Also checks the step count stays within 2*WIDTH + 6 cycles.
module tb_ecc_modinv;
  localparam int W = 17;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [W-1:0] a, p, r;
  int checks = 0, failures = 0, worst = 0;
  ecc_modinv #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    longint pm [4] = '{65521, 131071, 3, 97};
    a = 0; p = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    foreach (pm[j]) for (int i = 0; i < 60; i++) begin
      longint av; int cyc;
      p  = W'(pm[j]);
      av = (i == 0) ? 0 : (i == 1) ? 1 : (i == 2) ? pm[j] - 1 : 1 + longint'($urandom) % (pm[j] - 1);
      a = W'(av); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      if (cyc > worst) worst = cyc;
      checks++;
      if (av == 0) begin
        if (r != 0) begin failures++; $display("FAIL inv(0) = %0d", r); end
      end else if (longint'(r) >= pm[j] || (av * longint'(r)) % pm[j] != 1) begin
        failures++; $display("FAIL inv(%0d) mod %0d = %0d", av, pm[j], r);
      end
      checks++;
      if (cyc > 2 * W + 6) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("worst-case cycles %0d", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
