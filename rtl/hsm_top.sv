// hsm_top: programmable hardware security module for a blockchain node
// that tracks ICs through the supply chain.
//
// The node talks to the module through one command port. The module holds
// every secret itself: private-key-derived enroll IDs, PUF-derived device
// hashes, and the logic and JTAG keys of each IC, which leave only when a
// participant passes all three access levels.
//
//   ecdsa_keygen          KEYGEN: public key = private key x G; its x
//                         coordinate becomes the session's enroll ID
//   hsm_access_ctrl       SET_OWNER, HASHID, REGISTER, ACCESS
//   ip_verification_unit  IC database: enroll ID, IC ID, PUF challenge
//   hsm_key_memory        device hash, block header, tester / integrator
//                         IDs, logic key, JTAG key, IP stage
//   crypto_module         hybrid PUF followed by SHA-256 (HashID)
//   merkle_block          GENESIS, BLOCK: Merkle root of four transactions
//                         and the header hash of the next block
//   ecdsa_sign_verify     ECDSA: signs a message hash with priv_key and a
//                         caller-supplied nonce, or verifies (r, s) against
//                         a public key (sig_mode selects)
//
// Interface: drive `cmd` and its operands with `cmd_valid` for one cycle
// while `busy` is low. `rsp_valid` pulses when the command finishes, with
// `rsp_status`; the other outputs hold that command's results until the
// next command of the same unit. The curve is an input, so the key
// generator serves any curve that fits in ECC_WIDTH bits.
//
// The set of units and their connections follow the document's HSM
// figure; the command set and the single command port are this design's.
module hsm_top
  import hsm_pkg::*;
#(
  parameter int unsigned ECC_WIDTH    = ECC_W,
  parameter int unsigned DEPTH        = NUM_IC,
  parameter int unsigned PUF_INSTANCE = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // curve for key generation
  input  logic [ECC_WIDTH-1:0] curve_p,
  input  logic [ECC_WIDTH-1:0] curve_a,
  input  logic [ECC_WIDTH-1:0] curve_gx,
  input  logic [ECC_WIDTH-1:0] curve_gy,
  input  logic [ECC_WIDTH-1:0] curve_n,
  // command port
  input  logic                 cmd_valid,
  input  cmd_t                 cmd,
  output logic                 busy,
  input  logic [ECC_WIDTH-1:0] priv_key,
  input  logic [ID_W-1:0]      reg_enroll_id,
  input  logic [DEV_W-1:0]     reg_device_id,
  input  logic [CH_W-1:0]      reg_challenge,
  input  logic [HASH_W-1:0]    reg_device_hash,
  input  logic [ID_W-1:0]      reg_tester_id,
  input  logic [ID_W-1:0]      reg_integrator_id,
  input  logic [KEY_W-1:0]     reg_logic_key,
  input  logic [KEY_W-1:0]     reg_jtag_key,
  input  logic [DEV_W-1:0]     acc_device_id,
  input  logic [HASH_W-1:0]    acc_block_header,
  input  logic [BN_W-1:0]      acc_block_num,
  input  logic [HASH_W-1:0]    genesis_hash,
  input  logic [TXN_W-1:0]     txn [4],
  input  logic [TS_W-1:0]      timestamp,
  input  logic                 sig_mode,     // CMD_ECDSA: 0 = sign, 1 = verify
  input  logic [ECC_WIDTH-1:0] sig_hash_z,
  input  logic [ECC_WIDTH-1:0] sig_nonce,
  input  logic [ECC_WIDTH-1:0] sig_pub_x,
  input  logic [ECC_WIDTH-1:0] sig_pub_y,
  input  logic [ECC_WIDTH-1:0] sig_r_in,
  input  logic [ECC_WIDTH-1:0] sig_s_in,
  // responses
  output logic                 rsp_valid,
  output status_t              rsp_status,
  output logic                 session_valid,
  output logic [ECC_WIDTH-1:0] pub_x,
  output logic [ECC_WIDTH-1:0] pub_y,
  output logic [1:0]           access_level,
  output logic                 key_valid,
  output logic                 key_is_jtag,
  output logic [KEY_W-1:0]     out_key,
  output logic [HASH_W-1:0]    device_hid,
  output ip_stage_t            ip_stage,
  output logic [HASH_W-1:0]    hash_id,
  output logic [HASH_W-1:0]    merkle_root,
  output logic [HASH_W-1:0]    block_header,
  output logic [HASH_W-1:0]    prev_block_hash,
  output logic [BN_W-1:0]      block_num,
  output logic [ECC_WIDTH-1:0] sig_r,
  output logic [ECC_WIDTH-1:0] sig_s,
  output logic                 sig_ok
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  // ---------------------------------------------------------------- dispatch
  logic is_kg, is_blk, is_gen, is_sig, is_ctl;
  assign is_kg  = cmd_valid && !busy && cmd == CMD_KEYGEN;
  assign is_gen = cmd_valid && !busy && cmd == CMD_GENESIS;
  assign is_blk = cmd_valid && !busy && cmd == CMD_BLOCK;
  assign is_sig = cmd_valid && !busy && cmd == CMD_ECDSA;
  assign is_ctl = cmd_valid && !busy && !(cmd inside {CMD_KEYGEN, CMD_GENESIS, CMD_BLOCK, CMD_ECDSA});

  // ---------------------------------------------------------------- key generation
  logic kg_busy, kg_done, kg_err;
  logic [ECC_WIDTH-1:0] kg_x, kg_y;

  ecdsa_keygen #(.WIDTH(ECC_WIDTH)) u_keygen (
    .clk, .rst_n, .start(is_kg), .priv_key,
    .curve_p, .curve_a, .curve_gx, .curve_gy, .curve_n,
    .busy(kg_busy), .done(kg_done), .key_err(kg_err), .pub_x(kg_x), .pub_y(kg_y));

  // The session's enroll ID is taken when key generation finishes; the
  // response follows one cycle later, when pub_x / pub_y show the new key.
  logic [ID_W-1:0] session_id;
  logic            kg_rsp_q, kg_err_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      session_valid <= 1'b0; session_id <= '0; pub_x <= '0; pub_y <= '0;
      kg_rsp_q <= 1'b0; kg_err_q <= 1'b0;
    end else begin
      kg_rsp_q <= kg_done;
      if (kg_done) begin
        session_valid <= !kg_err;
        session_id    <= ID_W'(kg_x);
        pub_x         <= kg_x;
        pub_y         <= kg_y;
        kg_err_q      <= kg_err;
      end
    end
  end

  // ---------------------------------------------------------------- signatures
  logic sv_busy, sv_done, sv_err;
  ecdsa_sign_verify #(.WIDTH(ECC_WIDTH)) u_sign (
    .clk, .rst_n, .start(is_sig), .mode(sig_mode),
    .curve_p, .curve_a, .curve_gx, .curve_gy, .curve_n,
    .hash_z(sig_hash_z), .priv_key, .nonce_k(sig_nonce), .pub_x(sig_pub_x), .pub_y(sig_pub_y),
    .sig_r_in, .sig_s_in, .busy(sv_busy), .done(sv_done),
    .sig_r, .sig_s, .sig_err(sv_err), .sig_ok);

  logic sig_mode_q;   // mode of the running ECDSA command, for its status
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sig_mode_q <= 1'b0;
    else if (is_sig) sig_mode_q <= sig_mode;
  end

  // ---------------------------------------------------------------- blockchain component
  logic mb_busy, mb_done;
  merkle_block u_block (
    .clk, .rst_n, .genesis(is_gen), .prev_hash_in(genesis_hash), .start(is_blk), .txn, .timestamp,
    .busy(mb_busy), .done(mb_done), .merkle_root, .block_header, .prev_hash(prev_block_hash), .block_num);

  logic gen_done_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gen_done_q <= 1'b0;
    else        gen_done_q <= is_gen;
  end

  // ---------------------------------------------------------------- access control
  logic ac_busy, ac_rsp;
  status_t ac_status;
  logic vu_wr_en, vu_wr_ok, vu_wr_full, vu_lk_hit;
  logic [ID_W-1:0] vu_wr_enroll_id, vu_lk_enroll_id;
  logic [DEV_W-1:0] vu_wr_device_id, vu_lk_device_id;
  logic [CH_W-1:0] vu_wr_challenge, vu_lk_challenge;
  logic [IW-1:0] vu_wr_idx, vu_lk_idx, km_wr_idx, km_stage_idx, km_rd_idx;
  logic km_wr_en, km_stage_en;
  ic_record_t km_wr_rec, km_rd_rec;
  ip_stage_t km_stage_val, km_rd_stage;
  logic cr_start, cr_busy, cr_done;
  logic [CH_W-1:0] cr_challenge;
  logic [HASH_W-1:0] cr_hash;

  hsm_access_ctrl #(.DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n, .cmd_valid(is_ctl), .cmd, .busy(ac_busy),
    .session_valid, .session_id,
    .reg_enroll_id, .reg_device_id, .reg_challenge, .reg_device_hash,
    .reg_tester_id, .reg_integrator_id, .reg_logic_key, .reg_jtag_key,
    .cur_block_header(block_header), .cur_block_num(block_num), .acc_device_id, .acc_block_header, .acc_block_num,
    .rsp_valid(ac_rsp), .rsp_status(ac_status), .access_level, .key_valid, .key_is_jtag,
    .out_key, .device_hid, .ip_stage, .hash_id_out(hash_id),
    .vu_wr_en, .vu_wr_enroll_id, .vu_wr_device_id, .vu_wr_challenge, .vu_wr_ok, .vu_wr_full, .vu_wr_idx,
    .vu_lk_enroll_id, .vu_lk_device_id, .vu_lk_hit, .vu_lk_idx, .vu_lk_challenge,
    .km_wr_en, .km_wr_idx, .km_wr_rec, .km_stage_en, .km_stage_idx, .km_stage_val,
    .km_rd_idx, .km_rd_rec, .km_rd_stage,
    .cr_start, .cr_challenge, .cr_done, .cr_hash);

  ip_verification_unit #(.DEPTH(DEPTH)) u_verif (
    .clk, .rst_n, .clear(1'b0),
    .wr_en(vu_wr_en), .wr_enroll_id(vu_wr_enroll_id), .wr_device_id(vu_wr_device_id),
    .wr_challenge(vu_wr_challenge), .wr_ok(vu_wr_ok), .wr_full(vu_wr_full), .wr_idx(vu_wr_idx),
    .lk_enroll_id(vu_lk_enroll_id), .lk_device_id(vu_lk_device_id),
    .lk_hit(vu_lk_hit), .lk_idx(vu_lk_idx), .lk_challenge(vu_lk_challenge));

  hsm_key_memory #(.DEPTH(DEPTH)) u_mem (
    .clk, .rst_n, .wr_en(km_wr_en), .wr_idx(km_wr_idx), .wr_rec(km_wr_rec),
    .stage_en(km_stage_en), .stage_idx(km_stage_idx), .stage_val(km_stage_val),
    .rd_idx(km_rd_idx), .rd_rec(km_rd_rec), .rd_stage(km_rd_stage));

  crypto_module #(.INSTANCE(PUF_INSTANCE)) u_crypto (
    .clk, .rst_n, .start(cr_start), .challenge(cr_challenge),
    .busy(cr_busy), .done(cr_done), .hash_id(cr_hash));

  // ---------------------------------------------------------------- response
  assign busy      = kg_busy || kg_done || mb_busy || ac_busy || sv_busy;
  assign rsp_valid = kg_rsp_q || mb_done || gen_done_q || ac_rsp || sv_done;
  always_comb begin
    if (kg_rsp_q)                 rsp_status = kg_err_q ? ST_BAD_KEY : ST_OK;
    else if (sv_done)             rsp_status = (sv_err || (sig_mode_q && !sig_ok)) ? ST_BAD_SIG : ST_OK;
    else if (mb_done || gen_done_q) rsp_status = ST_OK;
    else                          rsp_status = ac_status;
  end

endmodule
