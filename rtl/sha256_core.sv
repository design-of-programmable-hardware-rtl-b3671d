// sha256_core: SHA-256 compression of one 512-bit message block.
//
// The block goes through the 64 rounds of the compression function, one
// round per clock. The working ("message") registers a..h are loaded from
// the hash registers H0..H7 when a block starts; the 16-word message
// schedule window slides by one word per round. After round 63 the working
// registers are added (modulo 2^32, per FIPS 180-4) into the hash registers,
// which then hold the chaining value for the next block or the final digest.
//
// Interface: pulse `start` with `block` valid (first message word in bits
// 511:480) and `first` = 1 for the first block of a message (hash registers
// start from the standard initial value) or 0 to continue from the current
// hash registers. `done` pulses 66 cycles after `start`: a load cycle, 64 round cycles
// and one update cycle. `digest` holds the hash registers (H0 in bits 255:224).
// `start` is ignored while `busy`.
//
// The 64 rounds, the a..h and H0..H7 registers and the feedback of the
// hash registers follow the document's block diagram; one round per cycle
// is this design's choice.
module sha256_core
  import sha256_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         first,
  input  logic [511:0] block,
  output logic         busy,
  output logic         done,
  output logic [255:0] digest
);

  hash_t        h_q;          // hash registers, [7] = H0
  word_t        a, b, c, d, e, f, g, hh;
  word_t [15:0] w_q;          // [0] = W[t] of the current round
  logic  [5:0]  round_q;
  logic         update_q;

  word_t t1, t2, w_next;
  hash_t h_start;             // chaining value the next block starts from

  assign h_start = first ? H_INIT : h_q;

  always_comb begin
    t1     = hh + big_sigma1(e) + ch(e, f, g) + K[round_q] + w_q[0];
    t2     = big_sigma0(a) + maj(a, b, c);
    w_next = small_sigma1(w_q[14]) + w_q[9] + small_sigma0(w_q[1]) + w_q[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_q      <= H_INIT;
      {a, b, c, d, e, f, g, hh} <= '0;
      w_q      <= '0;
      round_q  <= '0;
      busy     <= 1'b0;
      update_q <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        h_q <= h_start;
        {a, b, c, d, e, f, g, hh} <= h_start;
        for (int i = 0; i < 16; i++) w_q[i] <= block[511 - 32*i -: 32];
        round_q <= '0;
        busy    <= 1'b1;
      end else if (busy && !update_q) begin
        hh <= g;
        g  <= f;
        f  <= e;
        e  <= d + t1;
        d  <= c;
        c  <= b;
        b  <= a;
        a  <= t1 + t2;
        for (int i = 0; i < 15; i++) w_q[i] <= w_q[i+1];
        w_q[15] <= w_next;
        round_q <= round_q + 6'd1;
        if (round_q == 6'd63) update_q <= 1'b1;
      end else if (update_q) begin
        h_q <= {h_q[7] + a, h_q[6] + b, h_q[5] + c, h_q[4] + d,
                h_q[3] + e, h_q[2] + f, h_q[1] + g, h_q[0] + hh};
        update_q <= 1'b0;
        busy     <= 1'b0;
        done     <= 1'b1;
      end
    end
  end

  assign digest = h_q;

endmodule
