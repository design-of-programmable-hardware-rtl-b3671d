// tb_sha256_hash: self-checking test of the SHA-256 engine.
// Hashes messages of 0, 8, 16, 24 ("abc"), 32, 48, 64, 128, 256, 300, 447
// and 448 bits (every size of the document's evaluation) and compares
// the digests with values from an independent software SHA-256 (the 0-bit
// and "abc" digests are the FIPS 180-4 examples). Also checks the cycle
// count: 68 cycles from start to done for one block, 135 for two.
module tb_sha256_hash;
  localparam int MAXB = 448;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [MAXB-1:0] msg;
  logic [8:0] msg_len;
  logic busy, done;
  logic [255:0] digest;
  int checks = 0, failures = 0;

  sha256_hash #(.MAX_BITS(MAXB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n, input logic [MAXB-1:0] v, input logic [255:0] exp, input int exp_cycles);
    int cyc = 0;
    @(negedge clk);
    msg = v; msg_len = 9'(n); start = 1'b1;
    @(negedge clk);
    start = 1'b0; msg = '1;   // inputs must have been captured
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (digest !== exp) begin
      failures++; $display("FAIL len=%0d digest=%h exp=%h", n, digest, exp);
    end
    if (cyc != exp_cycles) begin
      failures++; $display("FAIL len=%0d cycles=%0d exp=%0d", n, cyc, exp_cycles);
    end
  endtask

  initial begin
    msg = '0; msg_len = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0,   '0, 256'he3b0c44298fc1c149afbf4c8996fb92427ae41e4649b934ca495991b7852b855, 68);
    run(8,   'h22, 256'h8a331fdde7032f33a71e1b2e257d80166e348e00fcb17914f48bdb57a1c63007, 68);
    run(24,  'h616263, 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad, 68);
    // the remaining input sizes of the document's SHA-256 evaluation
    run(16,  'hd2e6,
         256'he1afd70817774f61b9705dbda6d53d82a4163a27826bd027f11e2c123cc85961, 68);
    run(32,  'hf2a74de4,
         256'h7dd44d1c85df01ff12ed8c8e8d06633dfcbc8e9394f5d7a8b50aff2164cbb3ff, 68);
    run(48,  'he513269e0d37,
         256'h10eb87bec1b234de5d8675a4273b6b3d47a5e6b5a5834d36824f0f07a66a3342, 68);
    run(64,  'h8c5c7fd0a6a3a450,
         256'h5b41cc0bc338003ad522c0ebce68295f6b38784c1f362ea9deda614f0a36b95e, 68);
    run(128, 'h9818e811892f902bd23f0824128b2f33,
         256'h5a400450bf30bb3de1361e48266565d26bcc9fce9ad6a8d2165535929d2d6b65, 68);
    run(256, 'h9600a35a099950d836f675cc81e74ef5e8e25d940ed904759531985d5d9dc9f8,
         256'h248b78da3cd042e99beba6830d594f39e9010a59ec96d0f5256b04f01af97852, 68);
    run(300, 'h78e7311d8a3c2ce6f447ed4d57b1e2feb89414c343c1027c4d1c386bbc4cd613e30d8f16adf,
         256'hcad906962ddc643eb581581477a5804785f8c89130b39789f930dea09a48ce54, 68);
    run(447, 'h623238acc324c9859b810e766ec9d28663ca828dd5f4b3b2e4b06ce60741c7a87ce42c8218072e8c35bf992dc9e9c616612e7696a6cecc1b,
         256'h89ab8c85846e6f17d5d6ca01a01aaf7769c2f2f5ca82c63f0f2a10cde9864e59, 68);
    run(448, 'h5b6e6e307d4bedc51431193e6c3f3391a2b8f1ff1fd42a29755d4c13a902931cd447e35b8b6d8fe442e3d437204e52db2221a58008a05a6,
         256'hed450154a223f1db19a438c3626356589796eae299cf3fcdb303c79c6f63445f, 135);
    // bits above msg_len must be ignored
    run(24,  {{(MAXB-24){1'b1}}, 24'h616263}, 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad, 68);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
