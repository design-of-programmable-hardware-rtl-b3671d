// tb_ecc_point_double: doubles random multiples of the test curve's base
// point (17-bit field) and compares with the software reference; covers
// P = O.
module tb_ecc_point_double;
  import ecc_ref_pkg::*;
  localparam int W = 17;
  logic clk = 0, rst_n = 0, start = 0, busy, done, p_inf, r_inf;
  logic [W-1:0] p, a, px, py, rx, ry;
  int checks = 0, failures = 0;
  ecc_point_double #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic run(pt_t s);
    pt_t e;
    e = padd(s, s);
    px = W'(s.x); py = W'(s.y); p_inf = s.inf;
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (r_inf != e.inf || (!e.inf && (rx != W'(e.x) || ry != W'(e.y)))) begin
      failures++; $display("FAIL 2*(%0d,%0d) = (%0d,%0d,%0b) exp (%0d,%0d,%0b)",
                           s.x, s.y, rx, ry, r_inf, e.x, e.y, e.inf);
    end
  endtask
  initial begin
    pt_t s, o;
    o.x = 0; o.y = 0; o.inf = 1;
    p = W'(P); a = W'(A); {px, py, p_inf} = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(gen());
    for (int i = 0; i < 40; i++) run(pmul(1 + longint'($urandom) % (N - 1), gen()));
    run(o);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
