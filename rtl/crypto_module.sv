// crypto_module: the HSM's crypto module, a hybrid PUF feeding SHA-256.
//
// A challenge goes to the PUF; its response is hashed as an RESP_W-bit
// message and the digest is the device's hash ID (HashID). The PUF
// response never leaves the module.
//
// Interface: pulse `start` with `challenge` valid; `done` pulses with
// `hash_id` valid 69 cycles later (one cycle for the PUF's registered
// response, 68 for a one-block hash). `busy` is high in
// between.
//
// The PUF-then-hash structure follows the document; the handshake is this
// design's choice.
module crypto_module #(
  parameter int unsigned CH_W     = hsm_pkg::CH_W,
  parameter int unsigned RESP_W   = hsm_pkg::RESP_W,
  parameter int unsigned INSTANCE = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [CH_W-1:0] challenge,
  output logic            busy,
  output logic            done,
  output logic [255:0]    hash_id
);

  localparam int unsigned LW = $clog2(RESP_W + 1);

  logic              puf_en, puf_valid, sha_busy;
  logic [RESP_W-1:0] ic_response;

  typedef enum logic [1:0] {S_IDLE, S_PUF, S_HASH} state_t;
  state_t state_q;

  hybrid_puf #(.CH_BITS(CH_W), .RESP_BITS(RESP_W), .INSTANCE(INSTANCE)) u_puf (
    .clk, .rst_n, .en(puf_en), .challenge, .response(ic_response), .valid(puf_valid));

  sha256_hash #(.MAX_BITS(RESP_W)) u_sha (
    .clk, .rst_n, .start(puf_valid), .msg(ic_response), .msg_len(LW'(RESP_W)),
    .busy(sha_busy), .done, .digest(hash_id));

  assign puf_en = (state_q == S_IDLE) && start;
  assign busy   = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= S_IDLE;
    else unique case (state_q)
      S_IDLE: if (start)     state_q <= S_PUF;
      S_PUF:  if (puf_valid) state_q <= S_HASH;
      S_HASH: if (done)      state_q <= S_IDLE;
      default:               state_q <= S_IDLE;
    endcase
  end

endmodule
