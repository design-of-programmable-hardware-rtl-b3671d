// merkle_block: the blockchain component of the nth block.
//
// Hashes four transactions into a Merkle tree and the tree's root into a
// block header hash, with one SHA-256 engine used eight times in turn:
//   H(A), H(B), H(C), H(D)             leaf hashes of the transactions
//   H(AB) = SHA(H(A)||H(B)), H(CD)     pair hashes
//   root  = SHA(H(AB)||H(CD))          Merkle root
//   header = SHA(prev || root || timestamp)
// The previous-block hash register starts from the value loaded with
// `genesis` and is replaced by each new header, so consecutive blocks form
// a chain; `block_num` counts the blocks made since the genesis load.
//
// Interface: pulse `genesis` with `prev_hash_in` to start a chain. Pulse
// `start` with the four transactions and `timestamp` valid (captured);
// `done` pulses with `merkle_root` and `block_header` valid after the eight
// hashes (about 8 x 68 cycles plus one for the two-block header). Commands
// are ignored while `busy`.
//
// The four-transaction tree, the previous-block hash and the header follow
// the document's figure of the nth block. Single (not double) SHA-256, the
// header layout and the transaction width are this design's choices.
module merkle_block
  import hsm_pkg::*;
#(
  parameter int unsigned TXN_BITS = TXN_W,
  parameter int unsigned TS_BITS  = TS_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                genesis,
  input  logic [255:0]        prev_hash_in,
  input  logic                start,
  input  logic [TXN_BITS-1:0] txn [4],
  input  logic [TS_BITS-1:0]  timestamp,
  output logic                busy,
  output logic                done,
  output logic [255:0]        merkle_root,
  output logic [255:0]        block_header,
  output logic [255:0]        prev_hash,
  output logic [31:0]         block_num
);

  localparam int unsigned HDR_BITS = 512 + TS_BITS;
  localparam int unsigned MB = (HDR_BITS > TXN_BITS) ? HDR_BITS : TXN_BITS;
  localparam int unsigned LW = $clog2(MB + 1);

  logic [TXN_BITS-1:0] txn_q [4];
  logic [TS_BITS-1:0]  ts_q;
  logic [255:0]        leaf_q [4];
  logic [255:0]        ab_q, cd_q;
  logic [3:0]          step_q;          // 0..7: which hash is running
  logic                run_q, launch_q;
  logic [MB-1:0]       msg;
  logic [LW-1:0]       msg_len;
  logic                sha_busy, sha_done;
  logic [255:0]        digest;

  always_comb begin
    msg     = '0;
    msg_len = '0;
    unique case (step_q)
      4'd0, 4'd1, 4'd2, 4'd3: begin msg = MB'(txn_q[step_q[1:0]]);        msg_len = LW'(TXN_BITS); end
      4'd4:                   begin msg = MB'({leaf_q[0], leaf_q[1]});     msg_len = LW'(512); end
      4'd5:                   begin msg = MB'({leaf_q[2], leaf_q[3]});     msg_len = LW'(512); end
      4'd6:                   begin msg = MB'({ab_q, cd_q});               msg_len = LW'(512); end
      default:                begin msg = MB'({prev_hash, merkle_root, ts_q}); msg_len = LW'(HDR_BITS); end
    endcase
  end

  sha256_hash #(.MAX_BITS(MB)) u_sha (
    .clk, .rst_n, .start(launch_q), .msg, .msg_len, .busy(sha_busy), .done(sha_done), .digest);

  assign busy = run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin txn_q[i] <= '0; leaf_q[i] <= '0; end
      ts_q <= '0; ab_q <= '0; cd_q <= '0; step_q <= '0;
      run_q <= 1'b0; launch_q <= 1'b0; done <= 1'b0;
      merkle_root <= '0; block_header <= '0; prev_hash <= '0; block_num <= '0;
    end else begin
      done     <= 1'b0;
      launch_q <= 1'b0;
      if (!run_q) begin
        if (genesis) begin
          prev_hash <= prev_hash_in;
          block_num <= '0;
        end else if (start) begin
          txn_q    <= txn;
          ts_q     <= timestamp;
          step_q   <= '0;
          run_q    <= 1'b1;
          launch_q <= 1'b1;
        end
      end else if (sha_done) begin
        unique case (step_q)
          4'd0, 4'd1, 4'd2, 4'd3: leaf_q[step_q[1:0]] <= digest;
          4'd4: ab_q <= digest;
          4'd5: cd_q <= digest;
          4'd6: merkle_root <= digest;
          default: ;
        endcase
        if (step_q == 4'd7) begin
          block_header <= digest;
          prev_hash    <= digest;      // the next block links to this one
          block_num    <= block_num + 1'b1;
          run_q        <= 1'b0;
          done         <= 1'b1;
        end else begin
          step_q   <= step_q + 1'b1;
          launch_q <= 1'b1;
        end
      end
    end
  end

endmodule
