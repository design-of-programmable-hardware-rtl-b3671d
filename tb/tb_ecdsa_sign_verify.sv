// tb_ecdsa_sign_verify: ten 24-bit messages signed with random keys and
// nonces on the 17-bit test curve (as in ECDSA, the hash input z is the
// leftmost 17 bits of the message); (r, s) is compared with the software
// reference, then each signature is verified. Verification must fail for a changed message, a
// changed r, the wrong public key, and r or s out of range.
module tb_ecdsa_sign_verify;
  import ecc_ref_pkg::*;
  localparam int W = 17;
  logic clk = 0, rst_n = 0, start = 0, mode = 0, busy, done, sig_err, sig_ok;
  logic [W-1:0] curve_p, curve_a, curve_gx, curve_gy, curve_n, hash_z, priv_key, nonce_k;
  logic [W-1:0] pub_x, pub_y, sig_r_in, sig_s_in, sig_r, sig_s;
  int checks = 0, failures = 0, n_valid = 0, n_rejected = 0;
  ecdsa_sign_verify #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic go(bit m);
    mode = m; start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  task automatic verify(longint z, pt_t q, longint r, longint s, bit exp);
    hash_z = W'(z); pub_x = W'(q.x); pub_y = W'(q.y); sig_r_in = W'(r); sig_s_in = W'(s);
    go(1);
    checks++;
    if (sig_ok != exp) begin failures++; $display("FAIL verify z=%0d r=%0d s=%0d gave %0b", z, r, s, sig_ok); end
    if (sig_ok) n_valid++; else n_rejected++;
  endtask

  initial begin
    curve_p = W'(P); curve_a = W'(A); curve_gx = W'(GX); curve_gy = W'(GY); curve_n = W'(N);
    {hash_z, priv_key, nonce_k, pub_x, pub_y, sig_r_in, sig_s_in} = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 10; i++) begin
      longint d, k, z, r, s;
      int unsigned msg;
      pt_t q, kg;
      d = 1 + longint'($urandom) % (N - 1);
      k = 1 + longint'($urandom) % (N - 1);
      msg = $urandom % (1 << 24);                       // a 24-bit message
      z = longint'(msg) >> (24 - W);                    // its leftmost W bits; may exceed n
      q = pmul(d, gen());
      kg = pmul(k, gen());
      r = kg.x % N;
      s = mmul(minv(k, N), (z % N + mmul(r, d, N)) % N, N);
      priv_key = W'(d); nonce_k = W'(k); hash_z = W'(z);
      go(0);
      checks++;
      if (sig_err || sig_r != W'(r) || sig_s != W'(s)) begin
        failures++; $display("FAIL sign d=%0d k=%0d z=%0d -> (%0d, %0d) exp (%0d, %0d)", d, k, z, sig_r, sig_s, r, s);
      end
      verify(z, q, r, s, 1);
      if (i < 3) begin
        verify((z + 1) % (longint'(1) << W), q, r, s, 0);
        verify(z, q, (r % (N - 1)) + 1, s, 0);
        verify(z, pmul(d + 1, gen()), r, s, 0);
      end
    end
    begin
      pt_t q;
      q = pmul(5, gen());
      verify(7, q, 0, 5, 0);
      verify(7, q, 5, N, 0);
    end
    $display("valid %0d rejected %0d", n_valid, n_rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
