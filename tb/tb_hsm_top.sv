// tb_hsm_top: end-to-end test of the hardware security module at its
// default sizes, on the secp256k1 curve.
//
// Three participants (design owner, tester, system integrator) generate
// their key pairs; their public keys, checked against values computed
// independently, become their enroll IDs. The owner takes ownership, starts
// a chain and hashes a block of four transactions, enrols a device's
// HashID, registers ICs until the database is full, and a second block is
// added. The tester and the integrator then try to access ICs: wrong IDs,
// wrong role, a counterfeit device, a wrong block header or block number,
// and granted access. The tester signs a 24-bit message and the signature
// is verified, then rejected for a changed message. Merkle roots, block
// headers and HashIDs are checked against a software SHA-256 and a separate
// PUF model instance. Each mechanism is counted; one that never happens is
// a failure.
module tb_hsm_top;
  import hsm_pkg::*;
  import sha_ref_pkg::*;

  localparam logic [255:0] SECP_P  = 256'hFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFEFFFFFC2F;
  localparam logic [255:0] SECP_N  = 256'hFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFEBAAEDCE6AF48A03BBFD25E8CD0364141;
  localparam logic [255:0] SECP_GX = 256'h79BE667EF9DCBBAC55A06295CE870B07029BFCDB2DCE28D959F2815B16F81798;
  localparam logic [255:0] SECP_GY = 256'h483ADA7726A3C4655DA4FBFC0E1108A8FD17B448A68554199C47D08FFB10D4B8;

  // private keys and their public keys (x, y)
  localparam logic [255:0] D_OWN = 256'hC0FFEE1234567890ABCDEF;
  localparam logic [255:0] X_OWN = 256'hd5c9b2b593257c8ae5386baa82dfe4a9c7ab06af70e455eab4b0cdf2bccfa98e;
  localparam logic [255:0] Y_OWN = 256'h1f79a27ffab507d9f09d61860e586b4850f56daa8386b80df420b5e4404b813e;
  localparam logic [255:0] D_TST = 256'h5EC0DE5EC0DE5EC0DE5EC0DE5EC0DE5EC0DE5EC0DE5EC0DE5EC0DE5EC0DE5EC0;
  localparam logic [255:0] X_TST = 256'hab5ab5e659a8755513f0d265e76b91badae858f802c97ae120e34bc77952a368;
  localparam logic [255:0] Y_TST = 256'hbdeae463588a0ef2e67e359f12f2745106c33c254cede768773110adfdd1750c;
  localparam logic [255:0] D_INT = 256'h1A7E6A7041A7E6A7041A7E6A7041A7E6A7041;
  localparam logic [255:0] X_INT = 256'h789720e06e798b367b25e5ef6464d31b573431bf70ea648a4d8a9110fa74c209;
  localparam logic [255:0] Y_INT = 256'h44301254a531f2ef63e65c7829d28b8108a712c3377276432e2c8044f1c51d3e;

  // tester's signature of SHA-256("abc") with nonce K_SIG
  localparam logic [255:0] K_SIG = 256'h4B1D0C0FFEE5EED;
  localparam logic [255:0] Z_ABC = 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad;
  localparam logic [255:0] R_SIG = 256'hc1f8f2d119ba89e49d47378b97c6c4b91a7d9a29156bc93f6aebc4ee4f18519c;
  localparam logic [255:0] S_SIG = 256'hbe0c94212981a126086e4a61c58110a028d54080772d772dce7d752cc8e52136;

  localparam logic [KEY_W-1:0] LKEY = 128'h0123_4567_89ab_cdef_0f1e_2d3c_4b5a_6978;
  localparam logic [KEY_W-1:0] JKEY = 128'hfedc_ba98_7654_3210_a5a5_5a5a_3c3c_c3c3;

  logic clk = 0, rst_n = 0;
  logic [255:0] curve_p, curve_a, curve_gx, curve_gy, curve_n, priv_key, pub_x, pub_y;
  logic cmd_valid = 0, busy;
  cmd_t cmd;
  logic [ID_W-1:0] reg_enroll_id, reg_tester_id, reg_integrator_id;
  logic [DEV_W-1:0] reg_device_id, acc_device_id;
  logic [CH_W-1:0] reg_challenge;
  logic [HASH_W-1:0] reg_device_hash, acc_block_header, genesis_hash, device_hid, hash_id;
  logic [HASH_W-1:0] merkle_root, block_header, prev_block_hash;
  logic [TXN_W-1:0] txn [4];
  logic [TS_W-1:0] timestamp;
  logic [KEY_W-1:0] reg_logic_key, reg_jtag_key, out_key;
  logic rsp_valid, session_valid, key_valid, key_is_jtag;
  status_t rsp_status;
  logic [1:0] access_level;
  ip_stage_t ip_stage;
  logic [BN_W-1:0] block_num, acc_block_num;
  logic sig_mode, sig_ok;
  logic [255:0] sig_hash_z, sig_nonce, sig_pub_x, sig_pub_y, sig_r_in, sig_s_in, sig_r, sig_s;
  int checks = 0, failures = 0;

  hsm_top dut (.*);

  // reference PUF, same instance as the module's crypto module
  logic pen = 0, pvalid;
  logic [CH_W-1:0] pch = '0;
  logic [RESP_W-1:0] presp;
  hybrid_puf #(.CH_BITS(CH_W), .RESP_BITS(RESP_W), .INSTANCE(1)) ref_puf (
    .clk, .rst_n, .en(pen), .challenge(pch), .response(presp), .valid(pvalid));

  always #5 clk = ~clk;
  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_keygen = 0, n_badkey = 0, n_nosess = 0, n_owner = 0, n_ownerset = 0, n_notowner = 0;
  int n_hashid = 0, n_reg = 0, n_full = 0, n_idmis = 0, n_notrole = 0, n_l1 = 0, n_l2 = 0;
  int n_jtag = 0, n_logic = 0, n_genesis = 0, n_block = 0, n_sign = 0, n_sig_ok = 0, n_sig_bad = 0;

  task automatic issue(cmd_t c, status_t exp, int lvl = -1);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    while (!rsp_valid) @(negedge clk);
    checks++;
    if (rsp_status != exp || (lvl >= 0 && access_level != 2'(lvl))) begin
      failures++; $display("FAIL %s: %s level %0d, expected %s level %0d", c.name(), rsp_status.name(),
                           access_level, exp.name(), lvl);
    end
    if (c == CMD_ACCESS && exp != ST_OK) begin
      checks++;
      if (key_valid || out_key != '0) begin failures++; $display("FAIL key released on refusal"); end
    end
    case (rsp_status)
      ST_NO_SESSION: n_nosess++;
      ST_BAD_KEY: n_badkey++;
      ST_OWNER_SET: n_ownerset++;
      ST_NOT_OWNER: n_notowner++;
      ST_DB_FULL: n_full++;
      ST_ID_MISMATCH: n_idmis++;
      ST_NOT_ROLE: n_notrole++;
      ST_HASH_MISMATCH: n_l1++;
      ST_BH_MISMATCH: n_l2++;
      default: ;
    endcase
  endtask

  task automatic keygen(logic [255:0] d, logic [255:0] ex, logic [255:0] ey);
    longint t0;
    priv_key = d;
    t0 = longint'($time);
    issue(CMD_KEYGEN, ST_OK);
    checks++;
    if (!session_valid || pub_x != ex || pub_y != ey) begin
      failures++; $display("FAIL keygen %h -> (%h, %h)", d, pub_x, pub_y);
    end else n_keygen++;
    $display("key generation took %0d cycles", (longint'($time) - t0) / 10);
  endtask

  task automatic make_block(logic [255:0] prev, int seed);
    logic [255:0] l [4], ab, cd, root, hdr;
    for (int i = 0; i < 4; i++) txn[i] = {8{32'(seed * 4 + i) ^ 32'h5a5a0000}};
    timestamp = 32'h6500_0000 + 32'(seed);
    for (int i = 0; i < 4; i++) l[i] = sha256(1024'(txn[i]), TXN_W);
    ab = sha256(1024'({l[0], l[1]}), 512);
    cd = sha256(1024'({l[2], l[3]}), 512);
    root = sha256(1024'({ab, cd}), 512);
    hdr = sha256(1024'({prev, root, timestamp}), 512 + TS_W);
    issue(CMD_BLOCK, ST_OK);
    checks++;
    if (merkle_root != root || block_header != hdr || prev_block_hash != hdr) begin
      failures++; $display("FAIL block %0d root %h header %h", seed, merkle_root, block_header);
    end else n_block++;
  endtask

  task automatic reg_ic(logic [ID_W-1:0] part, int dev, logic [HASH_W-1:0] h, status_t exp);
    reg_enroll_id = part; reg_device_id = DEV_W'(dev); reg_challenge = 6; reg_device_hash = h;
    reg_tester_id = X_TST; reg_integrator_id = X_INT; reg_logic_key = LKEY; reg_jtag_key = JKEY;
    issue(CMD_REGISTER, exp);
    if (rsp_status == ST_OK) n_reg++;
  endtask

  task automatic access(int dev, logic [HASH_W-1:0] bh, status_t exp, int lvl, int bn = 1);
    acc_device_id = DEV_W'(dev); acc_block_header = bh; acc_block_num = BN_W'(bn);
    issue(CMD_ACCESS, exp, lvl);
  endtask

  initial begin
    logic [HASH_W-1:0] h6, bh1;
    curve_p = SECP_P; curve_a = '0; curve_gx = SECP_GX; curve_gy = SECP_GY; curve_n = SECP_N;
    priv_key = '0; cmd = CMD_KEYGEN; timestamp = '0;
    for (int i = 0; i < 4; i++) txn[i] = '0;
    {reg_enroll_id, reg_tester_id, reg_integrator_id, reg_device_id, acc_device_id, reg_challenge} = '0;
    acc_block_num = '0;
    {reg_device_hash, acc_block_header, reg_logic_key, reg_jtag_key} = '0;
    sig_mode = 0; {sig_hash_z, sig_nonce, sig_pub_x, sig_pub_y, sig_r_in, sig_s_in} = '0;
    genesis_hash = {8{32'h00000000}} | 256'h6e7e515;
    repeat (3) @(negedge clk); rst_n = 1;

    pch = 6; pen = 1; @(negedge clk); pen = 0;
    h6 = sha256(1024'(presp), RESP_W);

    access(1, '0, ST_NO_SESSION, 0);
    priv_key = '0;    issue(CMD_KEYGEN, ST_BAD_KEY);
    priv_key = SECP_N; issue(CMD_KEYGEN, ST_BAD_KEY);
    checks++; if (session_valid) begin failures++; $display("FAIL session after bad key"); end

    // design owner
    keygen(D_OWN, X_OWN, Y_OWN);
    issue(CMD_SET_OWNER, ST_OK); n_owner++;
    issue(CMD_GENESIS, ST_OK); n_genesis++;
    checks++; if (prev_block_hash != genesis_hash || block_num != 0) begin failures++; $display("FAIL genesis"); end
    make_block(genesis_hash, 1);
    bh1 = block_header;
    reg_challenge = 6;
    issue(CMD_HASHID, ST_OK);
    checks++; if (hash_id != h6) begin failures++; $display("FAIL HashID %h exp %h", hash_id, h6); end else n_hashid++;
    reg_ic(X_TST, 100, h6, ST_OK);
    checks++; if (ip_stage != STAGE_REGISTERED) begin failures++; $display("FAIL stage after registration"); end
    reg_ic(X_INT, 100, h6, ST_OK);
    reg_ic(X_TST, 101, ~h6, ST_OK);          // counterfeit: its PUF does not give the enrolled hash
    reg_ic(X_OWN, 102, h6, ST_OK);           // participant without a role on IC 102
    for (int i = 0; i < NUM_IC - 4; i++) reg_ic(X_TST, 200 + i, h6, ST_OK);
    reg_ic(X_TST, 300, h6, ST_DB_FULL);
    make_block(bh1, 2);
    checks++; if (block_num != 2) begin failures++; $display("FAIL block count"); end

    // tester
    keygen(D_TST, X_TST, Y_TST);
    issue(CMD_SET_OWNER, ST_OWNER_SET);
    reg_ic(X_TST, 400, h6, ST_NOT_OWNER);
    access(555, bh1, ST_ID_MISMATCH, 0);
    access(101, bh1, ST_HASH_MISMATCH, 1);
    access(100, block_header, ST_BH_MISMATCH, 2);   // header of the wrong block
    access(100, bh1, ST_BH_MISMATCH, 2, 2);         // right header, wrong block number
    access(100, bh1, ST_OK, 3);
    checks++;
    if (!key_valid || !key_is_jtag || out_key != JKEY || ip_stage != STAGE_TESTING || device_hid != h6) begin
      failures++; $display("FAIL tester grant");
    end else n_jtag++;

    // tester signs a 24-bit message; the signature is verified, then
    // rejected for a different message
    checks++; if (sha256(1024'(24'h616263), 24) != Z_ABC) begin failures++; $display("FAIL message hash"); end
    sig_mode = 0; sig_hash_z = Z_ABC; sig_nonce = K_SIG;
    issue(CMD_ECDSA, ST_OK);
    checks++;
    if (sig_r != R_SIG || sig_s != S_SIG) begin failures++; $display("FAIL signature %h %h", sig_r, sig_s); end
    else n_sign++;
    sig_mode = 1; sig_pub_x = X_TST; sig_pub_y = Y_TST; sig_r_in = sig_r; sig_s_in = sig_s;
    issue(CMD_ECDSA, ST_OK);
    checks++; if (!sig_ok) begin failures++; $display("FAIL verify"); end else n_sig_ok++;
    sig_hash_z = Z_ABC ^ 256'h1;
    issue(CMD_ECDSA, ST_BAD_SIG);
    checks++; if (sig_ok) begin failures++; $display("FAIL verify of a changed message"); end else n_sig_bad++;

    // system integrator
    keygen(D_INT, X_INT, Y_INT);
    access(100, bh1, ST_OK, 3);
    checks++;
    if (!key_valid || key_is_jtag || out_key != LKEY || ip_stage != STAGE_INTEGRATION) begin
      failures++; $display("FAIL integrator grant");
    end else n_logic++;

    // owner has no role on IC 102
    keygen(D_OWN, X_OWN, Y_OWN);
    access(102, bh1, ST_NOT_ROLE, 0);

    $display("mechanisms: keygen %0d bad-key %0d no-session %0d owner %0d owner-already-set %0d not-owner %0d",
             n_keygen, n_badkey, n_nosess, n_owner, n_ownerset, n_notowner);
    $display("            hashid %0d registered %0d db-full %0d id-mismatch %0d not-role %0d level1-stop %0d level2-stop %0d",
             n_hashid, n_reg, n_full, n_idmis, n_notrole, n_l1, n_l2);
    $display("            jtag-grant %0d logic-grant %0d genesis %0d blocks %0d sign %0d verify-pass %0d verify-reject %0d",
             n_jtag, n_logic, n_genesis, n_block, n_sign, n_sig_ok, n_sig_bad);
    begin
      int cnt [20];
      cnt = '{n_keygen, n_badkey, n_nosess, n_owner, n_ownerset, n_notowner, n_hashid, n_reg, n_full,
              n_idmis, n_notrole, n_l1, n_l2, n_jtag, n_logic, n_genesis, n_block, n_sign, n_sig_ok, n_sig_bad};
      foreach (cnt[i]) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
