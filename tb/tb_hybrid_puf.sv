// tb_hybrid_puf: twenty PUF instances (4-bit challenge, 8-bit response)
// answer the challenge 0001, as in the document's evaluation. Checks that
// each instance repeats its response, that responses depend on the
// challenge, that the response is cleared after its valid cycle, and that
// the PUF metrics are in a sensible band: uniqueness
// (average pairwise Hamming distance over 20 instances) between 35% and
// 65%, uniformity (fraction of ones) between 30% and 70%. The response
// arrives one cycle after `en`. A second group runs the larger
// configurations of the document's FPGA evaluation: an 8-bit challenge with
// 8, 16, 32, 64 and 128-bit responses; each must repeat, depend on the
// challenge, and have a uniformity between 30% and 70% over 16 challenges.
module tb_hybrid_puf;
  localparam int NI = 20, CB = 4, RB = 8;
  logic clk = 0, rst_n = 0, en = 0;
  logic [CB-1:0] challenge;
  logic [RB-1:0] resp [NI];
  logic [NI-1:0] valid;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NI; i++) begin : g_inst
    hybrid_puf #(.CH_BITS(CB), .RESP_BITS(RB), .INSTANCE(i + 1)) u_puf (
      .clk, .rst_n, .en, .challenge, .response(resp[i]), .valid(valid[i]));
  end

  // 8-bit challenge, responses of 8 to 128 bits
  localparam int RBW [5] = '{8, 16, 32, 64, 128};
  logic [7:0] wch;
  logic [127:0] wresp [5];
  logic [4:0] wvalid;
  for (genvar g = 0; g < 5; g++) begin : g_wide
    logic [RBW[g]-1:0] r;
    hybrid_puf #(.CH_BITS(8), .RESP_BITS(RBW[g]), .INSTANCE(100 + g)) u_puf (
      .clk, .rst_n, .en, .challenge(wch), .response(r), .valid(wvalid[g]));
    assign wresp[g] = 128'(r);
  end

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic ask(logic [CB-1:0] c, output logic [RB-1:0] r [NI]);
    challenge = c; en = 1;
    @(negedge clk); en = 0;
    checks++;
    if (valid != '1) begin failures++; $display("FAIL valid not one cycle after en"); end
    r = resp;
    @(negedge clk);
    checks++;
    foreach (resp[i]) if (resp[i] != '0) begin failures++; $display("FAIL response kept after use"); break; end
  endtask

  initial begin
    logic [RB-1:0] r1 [NI], r2 [NI], r3 [NI];
    int hd_sum, ones, pairs, ch_diff;
    real uniq, unif;
    challenge = 0; wch = 0; {hd_sum, ones, pairs, ch_diff} = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    ask(4'b0001, r1);
    ask(4'b1010, r3);
    ask(4'b0001, r2);
    for (int i = 0; i < NI; i++) begin
      $display("PUF%0d %b", i + 1, r1[i]);
      checks++;
      if (r1[i] != r2[i]) begin failures++; $display("FAIL instance %0d not repeatable", i + 1); end
      ones += $countones(r1[i]);
      ch_diff += $countones(r1[i] ^ r3[i]);
      for (int j = i + 1; j < NI; j++) begin hd_sum += $countones(r1[i] ^ r1[j]); pairs++; end
    end
    uniq = 100.0 * hd_sum / (pairs * RB);
    unif = 100.0 * ones / (NI * RB);
    $display("uniqueness %0.2f%%  uniformity %0.2f%%  challenge sensitivity %0d bits", uniq, unif, ch_diff);
    checks += 3;
    if (uniq < 35.0 || uniq > 65.0) begin failures++; $display("FAIL uniqueness"); end
    if (unif < 30.0 || unif > 70.0) begin failures++; $display("FAIL uniformity"); end
    if (ch_diff == 0) begin failures++; $display("FAIL response ignores challenge"); end

    begin
      logic [127:0] first [5], again [5];
      int wones [5];
      wones = '{default: 0};
      for (int c = 0; c < 16; c++) begin
        wch = 8'(c * 17 + 1); en = 1;
        @(negedge clk); en = 0;
        if (c == 0) first = wresp;
        for (int g = 0; g < 5; g++) wones[g] += $countones(wresp[g]);
        checks++;
        if (wvalid != '1) begin failures++; $display("FAIL wide valid"); end
        if (c == 1)
          for (int g = 0; g < 5; g++) begin
            checks++;
            if (wresp[g] == first[g]) begin failures++; $display("FAIL %0d-bit response ignores challenge", RBW[g]); end
          end
      end
      wch = 8'd1; en = 1;
      @(negedge clk); en = 0;
      again = wresp;
      for (int g = 0; g < 5; g++) begin
        real u;
        u = 100.0 * wones[g] / (16 * RBW[g]);
        $display("8-bit challenge, %0d-bit response: uniformity %0.2f%%", RBW[g], u);
        checks += 2;
        if (again[g] != first[g]) begin failures++; $display("FAIL %0d-bit response not repeatable", RBW[g]); end
        if (u < 30.0 || u > 70.0) begin failures++; $display("FAIL %0d-bit uniformity", RBW[g]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
