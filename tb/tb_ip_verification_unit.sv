// tb_ip_verification_unit: fills a 4-entry database, checks lookups of
// registered and unregistered (enroll ID, IC ID) pairs against a scoreboard,
// re-registration of the same pair in place, the full condition and clear.
module tb_ip_verification_unit;
  localparam int D = 4, IDW = 16, DW = 8, CW = 4;
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0, wr_ok, wr_full, lk_hit;
  logic [IDW-1:0] wr_enroll_id, lk_enroll_id;
  logic [DW-1:0] wr_device_id, lk_device_id;
  logic [CW-1:0] wr_challenge, lk_challenge;
  logic [1:0] wr_idx, lk_idx;
  int checks = 0, failures = 0;
  ip_verification_unit #(.DEPTH(D), .ID_W(IDW), .DEV_W(DW), .CH_W(CW)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic wr(int id, int dev, int ch, bit exp_ok, int exp_idx);
    @(negedge clk);
    wr_enroll_id = IDW'(id); wr_device_id = DW'(dev); wr_challenge = CW'(ch); wr_en = 1;
    @(negedge clk); wr_en = 0;
    checks++;
    if (wr_ok != exp_ok || wr_full == exp_ok || (exp_ok && wr_idx != 2'(exp_idx))) begin
      failures++; $display("FAIL write id=%0d dev=%0d ok=%0b full=%0b idx=%0d", id, dev, wr_ok, wr_full, wr_idx);
    end
  endtask

  task automatic lk(int id, int dev, bit exp_hit, int exp_ch);
    lk_enroll_id = IDW'(id); lk_device_id = DW'(dev);
    #1;
    checks++;
    if (lk_hit != exp_hit || (exp_hit && lk_challenge != CW'(exp_ch))) begin
      failures++; $display("FAIL lookup id=%0d dev=%0d hit=%0b ch=%0d", id, dev, lk_hit, lk_challenge);
    end
  endtask

  initial begin
    {wr_enroll_id, wr_device_id, wr_challenge, lk_enroll_id, lk_device_id} = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    lk(0, 0, 0, 0);                 // empty database
    wr(100, 1, 5, 1, 0);
    wr(200, 1, 6, 1, 1);
    wr(100, 2, 7, 1, 2);
    lk(100, 1, 1, 5); lk(200, 1, 1, 6); lk(100, 2, 1, 7);
    lk(200, 2, 0, 0); lk(300, 1, 0, 0);
    wr(100, 1, 9, 1, 0);            // same pair: updated in place
    lk(100, 1, 1, 9);
    wr(300, 3, 3, 1, 3);
    wr(400, 4, 4, 0, 0);            // full
    lk(400, 4, 0, 0); lk(300, 3, 1, 3);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    lk(100, 1, 0, 0);
    wr(500, 5, 1, 1, 0);
    lk(500, 5, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
