// hybrid_puf: behavioural model of the hybrid arbiter / butterfly PUF.
//
// This is a model, not a circuit: a real PUF gets its response from random
// manufacturing variation of transistor and routing delays, which RTL
// cannot express. Here each instance draws its own delays from a
// deterministic hash of the INSTANCE parameter, so different instances
// answer the same challenge differently and one instance always answers it
// the same way.
//
// Each response bit is one hybrid chain, and the chain is replicated
// RESP_BITS times with independent delays. A rising `en` edge enters two
// racing paths. For every challenge bit there are two swap stages, each a
// pair of multiplexers: the first is set by the challenge bit (0 = straight,
// 1 = crossed); the second is set by a butterfly cell (BPUF) that watches
// both paths. The BPUF is excited by the two racing edges and then settles
// to the stable state its own cross-coupled mismatch favours, which is drawn
// from the instance's variation like the delays. An arbiter flip-flop
// with the upper path on D and the lower path on its clock gives the bit:
// 1 when the upper path wins.
//
// Interface: pulse `en` with `challenge` valid; `response` is registered
// and `valid` pulses one cycle later. The response is held only in that
// cycle and reads as zero afterwards, so the secret is not kept once used.
//
// The mux-pair chain, the BPUF between challenge stages, the arbiter
// flip-flop, the replication to RESP_BITS bits and the 4-bit challenge /
// 8-bit response size follow the document, as does discarding the
// response after use. Delay values, the BPUF decision
// rule and the hash that stands for process variation are this model's
// own choices.
module hybrid_puf #(
  parameter int unsigned CH_BITS     = 4,
  parameter int unsigned RESP_BITS   = 8,
  parameter int unsigned INSTANCE    = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [CH_BITS-1:0]   challenge,
  output logic [RESP_BITS-1:0] response,
  output logic                 valid
);

  // Variation source: a 32-bit integer hash of (instance, bit, stage, element).
  function automatic logic [31:0] mix(logic [31:0] x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  // Delay of one multiplexer: 100 units nominal, +-10 from variation.
  function automatic int mux_delay(int unsigned bit_i, int unsigned stage, int unsigned elem);
    logic [31:0] h;
    h = mix(32'(INSTANCE) * 32'h9e3779b9 ^ mix(32'(bit_i) << 16 ^ 32'(stage) << 4 ^ 32'(elem)));
    return 90 + int'(h % 32'd21);
  endfunction

  function automatic logic bpuf_pref(int unsigned bit_i, int unsigned stage);
    logic [31:0] h;
    h = mix(32'(INSTANCE) * 32'h85ebca6b ^ mix(32'(bit_i) << 16 ^ 32'(stage) << 4 ^ 32'hf));
    return h[7];
  endfunction

  // Race through one chain for a challenge; returns the arbiter's decision.
  function automatic logic race(int unsigned bit_i, logic [CH_BITS-1:0] ch);
    int t_up, t_lo, n_up, n_lo;
    logic sel;
    t_up = 0;
    t_lo = 0;
    for (int unsigned s = 0; s < CH_BITS; s++) begin
      // challenge-controlled mux pair (elements 0..3)
      if (!ch[s]) begin n_up = t_up + mux_delay(bit_i, 2*s, 0); n_lo = t_lo + mux_delay(bit_i, 2*s, 1); end
      else        begin n_up = t_lo + mux_delay(bit_i, 2*s, 2); n_lo = t_up + mux_delay(bit_i, 2*s, 3); end
      t_up = n_up; t_lo = n_lo;
      // butterfly cell decides the next mux pair
      sel = bpuf_pref(bit_i, s);
      if (!sel) begin n_up = t_up + mux_delay(bit_i, 2*s+1, 0); n_lo = t_lo + mux_delay(bit_i, 2*s+1, 1); end
      else      begin n_up = t_lo + mux_delay(bit_i, 2*s+1, 2); n_lo = t_up + mux_delay(bit_i, 2*s+1, 3); end
      t_up = n_up; t_lo = n_lo;
    end
    // arbiter flip-flop: D = upper path, clock = lower path
    if (t_up != t_lo) return t_up < t_lo;
    return bpuf_pref(bit_i, CH_BITS);
  endfunction

  logic [RESP_BITS-1:0] resp_comb;
  always_comb begin
    for (int unsigned j = 0; j < RESP_BITS; j++) resp_comb[j] = race(j, challenge);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      response <= '0;
      valid    <= 1'b0;
    end else begin
      valid <= en;
      response <= en ? resp_comb : '0;   // cleared again once used
    end
  end

endmodule
