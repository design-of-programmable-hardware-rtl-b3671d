// sha256_hash: programmable SHA-256 of a message of any length up to MAX_BITS.
//
// The message pre-processing stage (sha256_padder) works out how many
// 512-bit blocks the padded message has and supplies them one at a time to
// the compression engine (sha256_core), which chains them through its hash
// registers. The 256-bit digest is the hash registers after the last block.
//
// Interface: pulse `start` with `msg` and `msg_len` valid; they are
// captured, so they may change afterwards. `done` pulses when `digest` is
// valid, 1 + 67 * nblocks cycles after `start` (for example 68
// cycles for up to 447 bits, 135 for 448..959). `busy` is high in between.
//
// The document's design takes an N-bit message and gives a fixed 256-bit
// digest; MAX_BITS = 448 is the largest input size it reports. Choosing the
// length at run time (msg_len) rather than only at build time is this
// design's choice.
module sha256_hash #(
  parameter int unsigned MAX_BITS = 448,
  localparam int unsigned LEN_W   = $clog2(MAX_BITS + 1),
  localparam int unsigned MAX_BLK = (MAX_BITS + 64) / 512 + 1,
  localparam int unsigned IDX_W   = (MAX_BLK > 1) ? $clog2(MAX_BLK) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [MAX_BITS-1:0] msg,
  input  logic [LEN_W-1:0]    msg_len,
  output logic                busy,
  output logic                done,
  output logic [255:0]        digest
);

  logic [MAX_BITS-1:0] msg_q;
  logic [LEN_W-1:0]    len_q;
  logic [IDX_W-1:0]    idx_q;
  logic [IDX_W:0]      nblocks;
  logic [511:0]        block;
  logic                core_start, core_first, core_busy, core_done;

  sha256_padder #(.MAX_BITS(MAX_BITS)) u_pad (
    .msg(msg_q), .msg_len(len_q), .blk_idx(idx_q), .nblocks(nblocks), .block(block)
  );

  sha256_core u_core (
    .clk(clk), .rst_n(rst_n), .start(core_start), .first(core_first), .block(block),
    .busy(core_busy), .done(core_done), .digest(digest)
  );

  typedef enum logic [1:0] {S_IDLE, S_LAUNCH, S_WAIT} state_t;
  state_t state_q;

  assign core_start = (state_q == S_LAUNCH);
  assign core_first = (idx_q == '0);
  assign busy       = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      msg_q   <= '0;
      len_q   <= '0;
      idx_q   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          msg_q   <= msg;
          len_q   <= msg_len;
          idx_q   <= '0;
          state_q <= S_LAUNCH;
        end
        S_LAUNCH: state_q <= S_WAIT;
        S_WAIT: if (core_done) begin
          if ((IDX_W + 1)'(idx_q) + 1'b1 < nblocks) begin
            idx_q   <= idx_q + 1'b1;
            state_q <= S_LAUNCH;
          end else begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A message longer than the configured maximum cannot be hashed.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (start && state_q == S_IDLE) |-> (32'(msg_len) <= MAX_BITS));

endmodule
