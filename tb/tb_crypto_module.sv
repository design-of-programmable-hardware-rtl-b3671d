// tb_crypto_module: for every 4-bit challenge, HashID must equal the
// software SHA-256 of the 8-bit response of a separately instantiated PUF
// model of the same instance, and arrive 69 cycles after start. Two
// crypto modules of different instances must give different HashIDs.
module tb_crypto_module;
  import sha_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, busy2, done2, pen = 0, pvalid;
  logic [3:0] challenge;
  logic [255:0] hash_id, hash2;
  logic [7:0] presp;
  int checks = 0, failures = 0, differ = 0;
  crypto_module #(.CH_W(4), .RESP_W(8), .INSTANCE(7)) dut (.*);
  crypto_module #(.CH_W(4), .RESP_W(8), .INSTANCE(8)) other (
    .clk, .rst_n, .start, .challenge, .busy(busy2), .done(done2), .hash_id(hash2));
  hybrid_puf #(.CH_BITS(4), .RESP_BITS(8), .INSTANCE(7)) ref_puf (
    .clk, .rst_n, .en(pen), .challenge, .response(presp), .valid(pvalid));
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    challenge = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 16; c++) begin
      int cyc;
      logic [255:0] e;
      challenge = 4'(c);
      pen = 1; @(negedge clk); pen = 0;
      e = sha256(1024'(presp), 8);
      start = 1; @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 2;
      if (hash_id != e) begin failures++; $display("FAIL ch=%0d hash %h exp %h", c, hash_id, e); end
      if (cyc != 69) begin failures++; $display("FAIL latency %0d", cyc); end
      if (hash2 != hash_id) differ++;
    end
    checks++;
    if (differ == 0) begin failures++; $display("FAIL two instances identical"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
