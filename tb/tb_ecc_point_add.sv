// tb_ecc_point_add: adds pairs of distinct multiples of the test curve's
// base point (17-bit field) and compares with the software reference;
// covers P = O, Q = O and P = -Q.
module tb_ecc_point_add;
  import ecc_ref_pkg::*;
  localparam int W = 17;
  logic clk = 0, rst_n = 0, start = 0, busy, done, p_inf, q_inf, r_inf;
  logic [W-1:0] p, px, py, qx, qy, rx, ry;
  int checks = 0, failures = 0;
  ecc_point_add #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic run(pt_t s, pt_t t);
    pt_t e;
    e = padd(s, t);
    px = W'(s.x); py = W'(s.y); p_inf = s.inf; qx = W'(t.x); qy = W'(t.y); q_inf = t.inf;
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (r_inf != e.inf || (!e.inf && (rx != W'(e.x) || ry != W'(e.y)))) begin
      failures++; $display("FAIL (%0d,%0d)+(%0d,%0d) = (%0d,%0d,%0b) exp (%0d,%0d,%0b)",
                           s.x, s.y, t.x, t.y, rx, ry, r_inf, e.x, e.y, e.inf);
    end
  endtask
  initial begin
    pt_t s, t, o;
    o.x = 0; o.y = 0; o.inf = 1;
    p = W'(P); {px, py, qx, qy, p_inf, q_inf} = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      longint k1, k2;
      k1 = 1 + longint'($urandom) % (N - 1);
      k2 = 1 + longint'($urandom) % (N - 1);
      if (k1 == k2) k2 = (k1 % (N - 1)) + 1;
      s = pmul(k1, gen()); t = pmul(k2, gen());
      if (!on_curve(s) || !on_curve(t)) $display("reference error");
      run(s, t);
    end
    s = pmul(1234, gen());
    run(o, s);
    run(s, o);
    t = pmul(N - 1234, gen());     // -s
    run(s, t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
