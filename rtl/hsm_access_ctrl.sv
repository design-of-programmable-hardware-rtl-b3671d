// hsm_access_ctrl: the HSM's command controller for IP registration and
// multi-level IC access.
//
// Owner: the first participant to issue SET_OWNER after reset, identified
// by the session enroll ID (the public key from key generation), becomes
// the design owner; later attempts are refused.
//
// HASHID (owner only): runs the crypto module on a challenge and returns
// HashID, so the owner can enrol the genuine device's hash.
//
// REGISTER (owner only, the IP registration phase): writes (participant
// enroll ID, IC ID, PUF challenge) to the IC database, and the same entry
// of the key memory gets the device hash, the current block header, the
// tester and integrator IDs, the logic key and the JTAG key. A participant
// who is not the owner gets NOT_OWNER.
//
// ACCESS (the access and verification phase), for the session's enroll ID
// and a given IC ID and block header:
//   - the pair must be registered (else ID_MISMATCH) and the participant
//     must be the IC's tester or integrator (else NOT_ROLE);
//   - level 1: the stored challenge goes to the crypto module, giving HashID;
//   - level 2: HashID must equal the stored device hash (else HASH_MISMATCH);
//   - level 3: the block number and block header given must equal the
//     stored ones (else BH_MISMATCH);
//   then a tester receives the JTAG access key and the IC's stage becomes
//   TESTING, an integrator receives the logic key and the stage becomes
//   INTEGRATION; the retrieved HashID is returned as device_hid.
//
// Interface: present a command with `cmd_valid` while `busy` is low (its
// operands are captured). `rsp_valid` pulses with `rsp_status`, the level
// reached and, on success, the key or hash. Key outputs are zero except
// after a granted ACCESS, and are cleared by the next command. REGISTER
// takes 3 cycles, ACCESS about 72, HASHID about 71.
//
// The checks, their order, the three levels, the block number and header
// asked of the participant, the two keys and the stage
// updates follow the document's access algorithm and HSM figure. The
// owner-setting command, the status codes and the HASHID enrolment command
// are this design's choices.
module hsm_access_ctrl
  import hsm_pkg::*;
#(
  parameter int unsigned DEPTH = NUM_IC,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              cmd_valid,
  input  cmd_t              cmd,
  output logic              busy,
  input  logic              session_valid,
  input  logic [ID_W-1:0]   session_id,
  input  logic [ID_W-1:0]   reg_enroll_id,
  input  logic [DEV_W-1:0]  reg_device_id,
  input  logic [CH_W-1:0]   reg_challenge,
  input  logic [HASH_W-1:0] reg_device_hash,
  input  logic [ID_W-1:0]   reg_tester_id,
  input  logic [ID_W-1:0]   reg_integrator_id,
  input  logic [KEY_W-1:0]  reg_logic_key,
  input  logic [KEY_W-1:0]  reg_jtag_key,
  input  logic [HASH_W-1:0] cur_block_header,
  input  logic [BN_W-1:0]   cur_block_num,
  input  logic [DEV_W-1:0]  acc_device_id,
  input  logic [HASH_W-1:0] acc_block_header,
  input  logic [BN_W-1:0]   acc_block_num,
  // response
  output logic              rsp_valid,
  output status_t           rsp_status,
  output logic [1:0]        access_level,
  output logic              key_valid,
  output logic              key_is_jtag,
  output logic [KEY_W-1:0]  out_key,
  output logic [HASH_W-1:0] device_hid,
  output ip_stage_t         ip_stage,
  output logic [HASH_W-1:0] hash_id_out,
  // IC database (ip_verification_unit)
  output logic              vu_wr_en,
  output logic [ID_W-1:0]   vu_wr_enroll_id,
  output logic [DEV_W-1:0]  vu_wr_device_id,
  output logic [CH_W-1:0]   vu_wr_challenge,
  input  logic              vu_wr_ok,
  input  logic              vu_wr_full,
  input  logic [IW-1:0]     vu_wr_idx,
  output logic [ID_W-1:0]   vu_lk_enroll_id,
  output logic [DEV_W-1:0]  vu_lk_device_id,
  input  logic              vu_lk_hit,
  input  logic [IW-1:0]     vu_lk_idx,
  input  logic [CH_W-1:0]   vu_lk_challenge,
  // key memory (hsm_key_memory)
  output logic              km_wr_en,
  output logic [IW-1:0]     km_wr_idx,
  output ic_record_t        km_wr_rec,
  output logic              km_stage_en,
  output logic [IW-1:0]     km_stage_idx,
  output ip_stage_t         km_stage_val,
  output logic [IW-1:0]     km_rd_idx,
  input  ic_record_t        km_rd_rec,
  input  ip_stage_t         km_rd_stage,
  // crypto module
  output logic              cr_start,
  output logic [CH_W-1:0]   cr_challenge,
  input  logic              cr_done,
  input  logic [HASH_W-1:0] cr_hash
);

  typedef enum logic [2:0] {S_IDLE, S_HASHID, S_REG, S_ACC_LOOK, S_ACC_HASH} state_t;
  state_t state_q;

  logic              owner_set_q;
  logic [ID_W-1:0]   owner_q, sess_q;
  logic [DEV_W-1:0]  acc_dev_q;
  logic [HASH_W-1:0] acc_bh_q;
  logic [BN_W-1:0]   acc_bn_q;
  ic_record_t        rec_q;
  logic [IW-1:0]     idx_q;
  logic              is_owner;

  assign busy     = (state_q != S_IDLE);
  assign is_owner = session_valid && owner_set_q && (session_id == owner_q);

  assign vu_lk_enroll_id = sess_q;
  assign vu_lk_device_id = acc_dev_q;
  assign km_rd_idx       = (state_q == S_ACC_LOOK) ? vu_lk_idx : idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      owner_set_q <= 1'b0; owner_q <= '0; sess_q <= '0;
      acc_dev_q <= '0; acc_bh_q <= '0; acc_bn_q <= '0; rec_q <= '0; idx_q <= '0;
      rsp_valid <= 1'b0; rsp_status <= ST_OK; access_level <= '0;
      key_valid <= 1'b0; key_is_jtag <= 1'b0; out_key <= '0; device_hid <= '0;
      ip_stage <= STAGE_NONE; hash_id_out <= '0;
      vu_wr_en <= 1'b0; vu_wr_enroll_id <= '0; vu_wr_device_id <= '0; vu_wr_challenge <= '0;
      km_wr_en <= 1'b0; km_wr_idx <= '0; km_wr_rec <= '0;
      km_stage_en <= 1'b0; km_stage_idx <= '0; km_stage_val <= STAGE_NONE;
      cr_start <= 1'b0; cr_challenge <= '0;
    end else begin
      rsp_valid   <= 1'b0;
      vu_wr_en    <= 1'b0;
      km_wr_en    <= 1'b0;
      km_stage_en <= 1'b0;
      cr_start    <= 1'b0;
      unique case (state_q)
        S_IDLE: if (cmd_valid) begin
          // a new command withdraws whatever the previous one released
          key_valid <= 1'b0; key_is_jtag <= 1'b0; out_key <= '0; device_hid <= '0;
          hash_id_out <= '0; access_level <= '0; ip_stage <= STAGE_NONE;
          sess_q <= session_id;
          if (!session_valid) begin
            rsp_valid <= 1'b1; rsp_status <= ST_NO_SESSION;
          end else begin
            unique case (cmd)
              CMD_SET_OWNER: begin
                rsp_valid <= 1'b1;
                if (owner_set_q) rsp_status <= ST_OWNER_SET;
                else begin
                  owner_q <= session_id; owner_set_q <= 1'b1; rsp_status <= ST_OK;
                end
              end
              CMD_HASHID: begin
                if (!is_owner) begin
                  rsp_valid <= 1'b1; rsp_status <= ST_NOT_OWNER;
                end else begin
                  cr_start <= 1'b1; cr_challenge <= reg_challenge; state_q <= S_HASHID;
                end
              end
              CMD_REGISTER: begin
                if (!is_owner) begin
                  rsp_valid <= 1'b1; rsp_status <= ST_NOT_OWNER;
                end else begin
                  vu_wr_en        <= 1'b1;
                  vu_wr_enroll_id <= reg_enroll_id;
                  vu_wr_device_id <= reg_device_id;
                  vu_wr_challenge <= reg_challenge;
                  rec_q <= '{device_hash: reg_device_hash, block_header: cur_block_header, block_num: cur_block_num,
                             tester_id: reg_tester_id, integrator_id: reg_integrator_id,
                             logic_key: reg_logic_key, jtag_key: reg_jtag_key};
                  state_q <= S_REG;
                end
              end
              CMD_ACCESS: begin
                acc_dev_q <= acc_device_id;
                acc_bh_q  <= acc_block_header;
                acc_bn_q  <= acc_block_num;
                state_q   <= S_ACC_LOOK;
              end
              default: begin
                rsp_valid <= 1'b1; rsp_status <= ST_BAD_CMD;
              end
            endcase
          end
        end

        S_HASHID: if (cr_done) begin
          hash_id_out <= cr_hash;
          rsp_valid <= 1'b1; rsp_status <= ST_OK;
          state_q <= S_IDLE;
        end

        S_REG: if (vu_wr_ok || vu_wr_full) begin
          if (vu_wr_ok) begin
            km_wr_en  <= 1'b1;
            km_wr_idx <= vu_wr_idx;
            km_wr_rec <= rec_q;
            rsp_status <= ST_OK;
            ip_stage   <= STAGE_REGISTERED;
          end else begin
            rsp_status <= ST_DB_FULL;
          end
          rsp_valid <= 1'b1;
          state_q   <= S_IDLE;
        end

        S_ACC_LOOK: begin
          if (!vu_lk_hit) begin
            rsp_valid <= 1'b1; rsp_status <= ST_ID_MISMATCH;
            state_q <= S_IDLE;
          end else if (sess_q != km_rd_rec.tester_id && sess_q != km_rd_rec.integrator_id) begin
            rsp_valid <= 1'b1; rsp_status <= ST_NOT_ROLE;
            state_q <= S_IDLE;
          end else begin
            idx_q        <= vu_lk_idx;
            rec_q        <= km_rd_rec;
            cr_start     <= 1'b1;
            cr_challenge <= vu_lk_challenge;
            access_level <= 2'd1;               // level 1: challenge sent to the crypto module
            state_q      <= S_ACC_HASH;
          end
        end

        S_ACC_HASH: if (cr_done) begin
          rsp_valid <= 1'b1;
          state_q   <= S_IDLE;
          ip_stage  <= km_rd_stage;
          if (cr_hash != rec_q.device_hash) begin
            rsp_status <= ST_HASH_MISMATCH;
          end else if (acc_bh_q != rec_q.block_header || acc_bn_q != rec_q.block_num) begin
            access_level <= 2'd2;
            rsp_status   <= ST_BH_MISMATCH;
          end else begin
            access_level <= 2'd3;
            rsp_status   <= ST_OK;
            device_hid   <= cr_hash;
            key_valid    <= 1'b1;
            km_stage_en  <= 1'b1;
            km_stage_idx <= idx_q;
            if (sess_q == rec_q.integrator_id) begin
              out_key <= rec_q.logic_key; key_is_jtag <= 1'b0;
              km_stage_val <= STAGE_INTEGRATION; ip_stage <= STAGE_INTEGRATION;
            end else begin
              out_key <= rec_q.jtag_key; key_is_jtag <= 1'b1;
              km_stage_val <= STAGE_TESTING; ip_stage <= STAGE_TESTING;
            end
          end
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A key is only ever released at access level 3.
  assert property (@(posedge clk) disable iff (!rst_n) key_valid |-> access_level == 2'd3);

endmodule
