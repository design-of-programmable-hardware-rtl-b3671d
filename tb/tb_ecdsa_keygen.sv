// tb_ecdsa_keygen: public keys for random private keys on the 17-bit test
// curve, compared with the software reference; d = 0 and d >= n must be
// refused with key_err. The public key must lie on the curve.
module tb_ecdsa_keygen;
  import ecc_ref_pkg::*;
  localparam int W = 17;
  logic clk = 0, rst_n = 0, start = 0, busy, done, key_err;
  logic [W-1:0] priv_key, curve_p, curve_a, curve_gx, curve_gy, curve_n, pub_x, pub_y;
  int checks = 0, failures = 0;
  ecdsa_keygen #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic run(longint d);
    pt_t e, q;
    bit bad;
    bad = (d == 0 || d >= N);
    e = pmul(d, gen());
    priv_key = W'(d);
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    q.x = pub_x; q.y = pub_y; q.inf = 0;
    checks++;
    if (bad) begin
      if (!key_err) begin failures++; $display("FAIL d=%0d accepted", d); end
    end else if (key_err || pub_x != W'(e.x) || pub_y != W'(e.y) || !on_curve(q)) begin
      failures++; $display("FAIL d=%0d Q=(%0d,%0d) exp (%0d,%0d)", d, pub_x, pub_y, e.x, e.y);
    end
  endtask
  initial begin
    curve_p = W'(P); curve_a = W'(A); curve_gx = W'(GX); curve_gy = W'(GY); curve_n = W'(N);
    priv_key = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(0); run(N); run(N + 5); run(1); run(N - 1);
    for (int i = 0; i < 20; i++) run(1 + longint'($urandom) % (N - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
