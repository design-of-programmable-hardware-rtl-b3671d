// tb_hsm_access_ctrl: the command controller with a 4-entry IC database,
// key memory and crypto module. Walks through owner setting, HashID
// enrolment, registration (by the owner and by others, until the database
// is full) and access attempts that stop at each level: unregistered IDs,
// wrong role, counterfeit device (hash mismatch), wrong block header or
// block number, and
// granted access for a tester (JTAG key, stage TESTING) and an integrator
// (logic key, stage INTEGRATION). Expected HashIDs come from a separate PUF
// model instance and a software SHA-256.
module tb_hsm_access_ctrl;
  import hsm_pkg::*;
  import sha_ref_pkg::*;
  localparam int D = 4;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, busy, session_valid = 0;
  cmd_t cmd;
  logic [ID_W-1:0] session_id, reg_enroll_id, reg_tester_id, reg_integrator_id;
  logic [DEV_W-1:0] reg_device_id, acc_device_id;
  logic [CH_W-1:0] reg_challenge;
  logic [HASH_W-1:0] reg_device_hash, cur_block_header, acc_block_header, device_hid, hash_id_out;
  logic [BN_W-1:0] cur_block_num, acc_block_num;
  logic [KEY_W-1:0] reg_logic_key, reg_jtag_key, out_key;
  logic rsp_valid, key_valid, key_is_jtag;
  status_t rsp_status;
  logic [1:0] access_level;
  ip_stage_t ip_stage;
  logic vu_wr_en, vu_wr_ok, vu_wr_full, vu_lk_hit, km_wr_en, km_stage_en, cr_start, cr_done, cr_busy;
  logic [ID_W-1:0] vu_wr_enroll_id, vu_lk_enroll_id;
  logic [DEV_W-1:0] vu_wr_device_id, vu_lk_device_id;
  logic [CH_W-1:0] vu_wr_challenge, vu_lk_challenge, cr_challenge;
  logic [1:0] vu_wr_idx, vu_lk_idx, km_wr_idx, km_stage_idx, km_rd_idx;
  ic_record_t km_wr_rec, km_rd_rec;
  ip_stage_t km_stage_val, km_rd_stage;
  logic [HASH_W-1:0] cr_hash;
  int checks = 0, failures = 0;

  hsm_access_ctrl #(.DEPTH(D)) dut (.*);
  ip_verification_unit #(.DEPTH(D)) u_vu (
    .clk, .rst_n, .clear(1'b0), .wr_en(vu_wr_en), .wr_enroll_id(vu_wr_enroll_id), .wr_device_id(vu_wr_device_id),
    .wr_challenge(vu_wr_challenge), .wr_ok(vu_wr_ok), .wr_full(vu_wr_full), .wr_idx(vu_wr_idx),
    .lk_enroll_id(vu_lk_enroll_id), .lk_device_id(vu_lk_device_id), .lk_hit(vu_lk_hit), .lk_idx(vu_lk_idx),
    .lk_challenge(vu_lk_challenge));
  hsm_key_memory #(.DEPTH(D)) u_km (
    .clk, .rst_n, .wr_en(km_wr_en), .wr_idx(km_wr_idx), .wr_rec(km_wr_rec), .stage_en(km_stage_en),
    .stage_idx(km_stage_idx), .stage_val(km_stage_val), .rd_idx(km_rd_idx), .rd_rec(km_rd_rec), .rd_stage(km_rd_stage));
  crypto_module #(.INSTANCE(3)) u_cr (
    .clk, .rst_n, .start(cr_start), .challenge(cr_challenge), .busy(cr_busy), .done(cr_done), .hash_id(cr_hash));

  // reference PUF of the same instance, for expected HashIDs
  logic pen = 0, pvalid;
  logic [CH_W-1:0] pch;
  logic [RESP_W-1:0] presp;
  hybrid_puf #(.CH_BITS(CH_W), .RESP_BITS(RESP_W), .INSTANCE(3)) ref_puf (
    .clk, .rst_n, .en(pen), .challenge(pch), .response(presp), .valid(pvalid));

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  localparam logic [ID_W-1:0] OWNER = 'h0A11CE, TESTER = 'hBEEF01, INTEGR = 'hCAFE02, OTHER = 'h0DD;
  localparam logic [KEY_W-1:0] LKEY = 128'h1111_2222_3333_4444_5555_6666_7777_8888;
  localparam logic [KEY_W-1:0] JKEY = 128'h9999_aaaa_bbbb_cccc_dddd_eeee_ffff_0000;

  task automatic issue(cmd_t c, logic [ID_W-1:0] who, bit sess, status_t exp, int exp_level = -1);
    @(negedge clk);
    cmd = c; session_id = who; session_valid = sess; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    while (!rsp_valid) @(negedge clk);
    checks++;
    if (rsp_status != exp || (exp_level >= 0 && access_level != 2'(exp_level))) begin
      failures++; $display("FAIL cmd %s: status %s level %0d, expected %s level %0d",
                           c.name(), rsp_status.name(), access_level, exp.name(), exp_level);
    end
    if (exp != ST_OK || c != CMD_ACCESS) begin
      checks++;
      if (key_valid || out_key != '0) begin failures++; $display("FAIL key released by %s", c.name()); end
    end
  endtask

  task automatic reg_ic(logic [ID_W-1:0] part, int dev, int ch, logic [HASH_W-1:0] h, status_t exp);
    reg_enroll_id = part; reg_device_id = DEV_W'(dev); reg_challenge = CH_W'(ch); reg_device_hash = h;
    reg_tester_id = TESTER; reg_integrator_id = INTEGR; reg_logic_key = LKEY; reg_jtag_key = JKEY;
    issue(CMD_REGISTER, OWNER, 1, exp);
  endtask

  task automatic access(logic [ID_W-1:0] who, int dev, logic [HASH_W-1:0] bh, status_t exp, int lvl);
    acc_device_id = DEV_W'(dev); acc_block_header = bh;
    issue(CMD_ACCESS, who, 1, exp, lvl);
  endtask

  initial begin
    logic [HASH_W-1:0] h5, bh;
    cmd = CMD_SET_OWNER; session_id = '0;
    {reg_enroll_id, reg_tester_id, reg_integrator_id, reg_device_id, acc_device_id, reg_challenge} = '0;
    {reg_device_hash, acc_block_header, reg_logic_key, reg_jtag_key} = '0;
    bh = {8{32'h0b10c4ea}};
    cur_block_header = bh;
    cur_block_num = 7; acc_block_num = 7;
    pch = 0;
    repeat (2) @(negedge clk); rst_n = 1;

    // expected HashID for challenge 5
    pch = 5; pen = 1; @(negedge clk); pen = 0;
    h5 = sha256(1024'(presp), RESP_W);

    issue(CMD_SET_OWNER, OWNER, 0, ST_NO_SESSION);
    issue(CMD_SET_OWNER, OWNER, 1, ST_OK);
    issue(CMD_SET_OWNER, OTHER, 1, ST_OWNER_SET);
    reg_challenge = 5;
    issue(CMD_HASHID, OTHER, 1, ST_NOT_OWNER);
    issue(CMD_HASHID, OWNER, 1, ST_OK);
    checks++;
    if (hash_id_out != h5) begin failures++; $display("FAIL HashID %h exp %h", hash_id_out, h5); end

    // Algorithm 1: only the owner registers
    reg_enroll_id = TESTER;
    issue(CMD_REGISTER, TESTER, 1, ST_NOT_OWNER);
    reg_ic(TESTER, 10, 5, h5, ST_OK);            // genuine IC 10 for the tester
    checks++; if (ip_stage != STAGE_REGISTERED) begin failures++; $display("FAIL stage after register"); end
    reg_ic(INTEGR, 10, 5, h5, ST_OK);            // and for the integrator
    reg_ic(TESTER, 11, 5, ~h5, ST_OK);           // IC 11: stored hash is not its PUF's (counterfeit)
    reg_ic(OTHER, 12, 5, h5, ST_OK);             // a participant with no role on IC 12
    reg_ic(TESTER, 13, 5, h5, ST_DB_FULL);       // database holds four entries

    // Algorithm 2
    access(OTHER, 10, bh, ST_ID_MISMATCH, 0);      // not registered for IC 10
    access(TESTER, 99, bh, ST_ID_MISMATCH, 0);     // unknown IC
    access(OTHER, 12, bh, ST_NOT_ROLE, 0);         // neither tester nor integrator
    access(TESTER, 11, bh, ST_HASH_MISMATCH, 1);   // level 1 reached, level 2 fails
    access(TESTER, 10, ~bh, ST_BH_MISMATCH, 2);    // level 2 reached, level 3 fails
    acc_block_num = 6;
    access(TESTER, 10, bh, ST_BH_MISMATCH, 2);     // right header, wrong block number
    acc_block_num = 7;
    access(TESTER, 10, bh, ST_OK, 3);
    checks++;
    if (!key_valid || !key_is_jtag || out_key != JKEY || ip_stage != STAGE_TESTING || device_hid != h5) begin
      failures++; $display("FAIL tester grant key=%h jtag=%0b stage=%s", out_key, key_is_jtag, ip_stage.name());
    end
    access(INTEGR, 10, bh, ST_OK, 3);
    checks++;
    if (!key_valid || key_is_jtag || out_key != LKEY || ip_stage != STAGE_INTEGRATION) begin
      failures++; $display("FAIL integrator grant key=%h stage=%s", out_key, ip_stage.name());
    end
    @(negedge clk);
    checks++;
    if (u_km.stage[1] != STAGE_INTEGRATION || u_km.stage[0] != STAGE_TESTING) begin
      failures++; $display("FAIL stored stages %s %s", u_km.stage[0].name(), u_km.stage[1].name());
    end
    issue(CMD_SET_OWNER, OWNER, 1, ST_OWNER_SET);  // next command withdraws the key
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
