// tb_merkle_block: builds two chained blocks of four random transactions
// and compares the Merkle root, the header hash, the previous-block link
// and the block count with the software SHA-256.
module tb_merkle_block;
  import sha_ref_pkg::*;
  logic clk = 0, rst_n = 0, genesis = 0, start = 0, busy, done;
  logic [255:0] prev_hash_in, merkle_root, block_header, prev_hash;
  logic [255:0] txn [4];
  logic [31:0] timestamp, block_num;
  int checks = 0, failures = 0;
  merkle_block dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [255:0] r256();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    logic [255:0] prev, l [4], ab, cd, root, hdr;
    prev_hash_in = r256(); timestamp = 0;
    for (int i = 0; i < 4; i++) txn[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    genesis = 1; @(negedge clk); genesis = 0;
    prev = prev_hash_in;
    for (int b = 1; b <= 2; b++) begin
      for (int i = 0; i < 4; i++) txn[i] = r256();
      timestamp = 32'h6000_0000 + 32'(b);
      for (int i = 0; i < 4; i++) l[i] = sha256(1024'(txn[i]), 256);
      ab   = sha256(1024'({l[0], l[1]}), 512);
      cd   = sha256(1024'({l[2], l[3]}), 512);
      root = sha256(1024'({ab, cd}), 512);
      hdr  = sha256(1024'({prev, root, timestamp}), 544);
      start = 1; @(negedge clk); start = 0;
      for (int i = 0; i < 4; i++) txn[i] = '1;
      while (!done) @(negedge clk);
      checks += 4;
      if (merkle_root != root)  begin failures++; $display("FAIL root %h exp %h", merkle_root, root); end
      if (block_header != hdr)  begin failures++; $display("FAIL header %h exp %h", block_header, hdr); end
      if (prev_hash != hdr)     begin failures++; $display("FAIL chain link"); end
      if (block_num != 32'(b))  begin failures++; $display("FAIL block_num %0d", block_num); end
      prev = hdr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
