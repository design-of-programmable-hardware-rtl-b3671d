// tb_hsm_key_memory: writes random records to every entry, reads them back
// against a scoreboard, updates stages, and checks that a record write
// resets its stage to "registered" and that reset clears everything.
module tb_hsm_key_memory;
  import hsm_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, wr_en = 0, stage_en = 0;
  logic [2:0] wr_idx, stage_idx, rd_idx;
  ic_record_t wr_rec, rd_rec, sb [D];
  ip_stage_t stage_val, rd_stage, sbs [D];
  int checks = 0, failures = 0;
  hsm_key_memory #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic ic_record_t rnd();
    logic [$bits(ic_record_t)-1:0] v;
    for (int i = 0; i < $bits(ic_record_t); i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic check_all();
    for (int i = 0; i < D; i++) begin
      rd_idx = 3'(i); #1;
      checks++;
      if (rd_rec != sb[i] || rd_stage != sbs[i]) begin failures++; $display("FAIL entry %0d stage %0d exp %0d rec %0b", i, rd_stage, sbs[i], rd_rec == sb[i]); end
    end
    @(negedge clk);
  endtask

  initial begin
    wr_idx = 0; stage_idx = 0; rd_idx = 0; wr_rec = '0; stage_val = STAGE_NONE;
    for (int i = 0; i < D; i++) begin sb[i] = '0; sbs[i] = STAGE_NONE; end
    repeat (2) @(negedge clk); rst_n = 1;
    check_all();
    for (int i = 0; i < D; i++) begin
      wr_idx = 3'(i); wr_rec = rnd(); wr_en = 1; @(negedge clk); wr_en = 0;
      sb[i] = wr_rec; sbs[i] = STAGE_REGISTERED;
    end
    check_all();
    stage_idx = 3; stage_val = STAGE_TESTING; stage_en = 1; @(negedge clk); stage_en = 0; sbs[3] = STAGE_TESTING;
    stage_idx = 5; stage_val = STAGE_INTEGRATION; stage_en = 1; @(negedge clk); stage_en = 0; sbs[5] = STAGE_INTEGRATION;
    check_all();
    wr_idx = 3; wr_rec = rnd(); wr_en = 1; @(negedge clk); wr_en = 0; sb[3] = wr_rec; sbs[3] = STAGE_REGISTERED;
    check_all();
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int i = 0; i < D; i++) begin sb[i] = '0; sbs[i] = STAGE_NONE; end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
