// hsm_pkg: sizes, commands and status codes shared by the hardware security
// module. The 4-bit PUF challenge and 8-bit response are the document's
// evaluated PUF size; the other widths are this design's choices (a 256-bit
// enroll ID is the x coordinate of a 256-bit curve public key).
package hsm_pkg;

  localparam int unsigned ECC_W   = 256;  // curve / key width
  localparam int unsigned ID_W    = 256;  // enroll ID = public key x
  localparam int unsigned DEV_W   = 32;   // IC (device) ID
  localparam int unsigned CH_W    = 4;    // PUF challenge
  localparam int unsigned RESP_W  = 8;    // PUF response
  localparam int unsigned KEY_W   = 128;  // logic key and JTAG access key
  localparam int unsigned HASH_W  = 256;  // SHA-256 digest
  localparam int unsigned NUM_IC  = 8;    // entries of the IC database
  localparam int unsigned TXN_W   = 256;  // one transaction record
  localparam int unsigned TS_W    = 32;   // block timestamp
  localparam int unsigned BN_W    = 32;   // block number

  // Commands from the computing node.
  typedef enum logic [2:0] {
    CMD_KEYGEN    = 3'd0,  // derive the participant's key pair; public key becomes the session enroll ID
    CMD_SET_OWNER = 3'd1,  // first caller after reset becomes the design owner
    CMD_HASHID    = 3'd2,  // owner only: HashID = SHA-256(PUF(challenge)) for enrolment
    CMD_REGISTER  = 3'd3,  // owner only: IP registration (Algorithm 1)
    CMD_ACCESS    = 3'd4,  // IC access and verification (Algorithm 2)
    CMD_GENESIS   = 3'd5,  // load the previous-block hash that starts the chain
    CMD_BLOCK     = 3'd6,  // hash four transactions into the next block
    CMD_ECDSA     = 3'd7   // sign a message hash or verify a signature (sig_mode)
  } cmd_t;

  typedef enum logic [3:0] {
    ST_OK            = 4'd0,
    ST_NOT_OWNER     = 4'd1,  // participant is not the design owner
    ST_NO_SESSION    = 4'd2,  // no enroll ID yet (no key generated)
    ST_BAD_KEY       = 4'd3,  // private key out of range
    ST_DB_FULL       = 4'd4,  // no free entry in the IC database
    ST_ID_MISMATCH   = 4'd5,  // enroll ID / IC ID not registered together
    ST_NOT_ROLE      = 4'd6,  // participant is neither tester nor integrator
    ST_HASH_MISMATCH = 4'd7,  // level 2 failed: HashID differs from stored device hash
    ST_BH_MISMATCH   = 4'd8,  // level 3 failed: block header differs
    ST_OWNER_SET     = 4'd9,  // owner already set
    ST_BAD_CMD       = 4'd10,
    ST_BAD_SIG       = 4'd11  // signature invalid, or r or s came out zero when signing
  } status_t;

  // Life-cycle stage of a registered IC.
  typedef enum logic [1:0] {
    STAGE_NONE        = 2'd0,
    STAGE_REGISTERED  = 2'd1,
    STAGE_TESTING     = 2'd2,
    STAGE_INTEGRATION = 2'd3
  } ip_stage_t;

  // Record of the HSM memory for one IC.
  typedef struct packed {
    logic [HASH_W-1:0] device_hash;    // SHA-256 of the genuine PUF response
    logic [HASH_W-1:0] block_header;   // header of the block the IC was recorded in
    logic [BN_W-1:0]   block_num;      // number of that block
    logic [ID_W-1:0]   tester_id;
    logic [ID_W-1:0]   integrator_id;
    logic [KEY_W-1:0]  logic_key;
    logic [KEY_W-1:0]  jtag_key;
  } ic_record_t;

endpackage
