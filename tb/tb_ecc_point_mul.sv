// tb_ecc_point_mul: k * G for random and edge-case scalars on the 17-bit
// test curve, compared with the software reference. k = n gives O, and
// k = 2*((n+1)/2) + 1 makes an add step meet R = P, exercising the
// switch to the doubler, which is counted.
module tb_ecc_point_mul;
  import ecc_ref_pkg::*;
  localparam int W = 17;
  logic clk = 0, rst_n = 0, start = 0, busy, done, r_inf;
  logic [W-1:0] k, p, a, px, py, rx, ry;
  int checks = 0, failures = 0;
  ecc_point_mul #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic run(longint kv);
    pt_t e;
    e = pmul(kv, gen());
    k = W'(kv);
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (r_inf != e.inf || (!e.inf && (rx != W'(e.x) || ry != W'(e.y)))) begin
      failures++; $display("FAIL %0d*G = (%0d,%0d,%0b) exp (%0d,%0d,%0b)", kv, rx, ry, r_inf, e.x, e.y, e.inf);
    end
  endtask
  int dbl_in_add = 0;
  always @(posedge clk) if (dut.dbl_start && dut.use_dbl_q) dbl_in_add++;
  initial begin
    p = W'(P); a = W'(A); px = W'(GX); py = W'(GY); k = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(1); run(2); run(3); run(N - 1); run(N);
    run((N + 1) / 2 * 2 + 1);   // prefix (N+1)/2 then bit 1: R = G at the add
    for (int i = 0; i < 25; i++) run(1 + longint'($urandom) % (N - 1));
    checks++;
    if (dbl_in_add == 0) begin failures++; $display("FAIL R = P case never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
