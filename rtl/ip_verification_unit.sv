// ip_verification_unit: the IC database of the HSM.
//
// Holds up to DEPTH entries of (enroll ID, IC ID, PUF challenge), the
// details written by the design owner when an IC is registered. A
// registration goes to the entry that already holds the same enroll ID and
// IC ID, otherwise to the lowest free entry; `wr_full` reports that none was
// left. The lookup port compares an (enroll ID, IC ID) pair with every
// valid entry at once and returns the matching entry's index and challenge.
//
// Interface: write with `wr_en` (one cycle); `wr_ok`, `wr_full` and `wr_idx`
// are registered results of that write, shown the next cycle. The lookup
// outputs are combinational. `clear` empties the database.
//
// The stored fields and the match on enroll ID and IC ID follow the
// document; the depth, the fully associative search and the replacement
// rule are this design's choices.
module ip_verification_unit #(
  parameter int unsigned DEPTH = hsm_pkg::NUM_IC,
  parameter int unsigned ID_W  = hsm_pkg::ID_W,
  parameter int unsigned DEV_W = hsm_pkg::DEV_W,
  parameter int unsigned CH_W  = hsm_pkg::CH_W,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             wr_en,
  input  logic [ID_W-1:0]  wr_enroll_id,
  input  logic [DEV_W-1:0] wr_device_id,
  input  logic [CH_W-1:0]  wr_challenge,
  output logic             wr_ok,
  output logic             wr_full,
  output logic [IW-1:0]    wr_idx,
  input  logic [ID_W-1:0]  lk_enroll_id,
  input  logic [DEV_W-1:0] lk_device_id,
  output logic             lk_hit,
  output logic [IW-1:0]    lk_idx,
  output logic [CH_W-1:0]  lk_challenge
);

  logic [DEPTH-1:0] valid_q;
  logic [ID_W-1:0]  id_q  [DEPTH];
  logic [DEV_W-1:0] dev_q [DEPTH];
  logic [CH_W-1:0]  ch_q  [DEPTH];

  // lookup
  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (valid_q[i] && id_q[i] == lk_enroll_id && dev_q[i] == lk_device_id) begin
        lk_hit = 1'b1;
        lk_idx = IW'(i);
      end
    end
  end
  assign lk_challenge = ch_q[lk_idx];

  // choose the entry for a write
  logic          w_same, w_free;
  logic [IW-1:0] w_same_idx, w_free_idx, w_idx;
  always_comb begin
    w_same = 1'b0; w_same_idx = '0;
    w_free = 1'b0; w_free_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (valid_q[i] && id_q[i] == wr_enroll_id && dev_q[i] == wr_device_id) begin
        w_same = 1'b1; w_same_idx = IW'(i);
      end
      if (!valid_q[i]) begin
        w_free = 1'b1; w_free_idx = IW'(i);
      end
    end
  end

  assign w_idx = w_same ? w_same_idx : w_free_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        id_q[i] <= '0; dev_q[i] <= '0; ch_q[i] <= '0;
      end
      wr_ok <= 1'b0; wr_full <= 1'b0; wr_idx <= '0;
    end else begin
      wr_ok   <= 1'b0;
      wr_full <= 1'b0;
      if (clear) begin
        valid_q <= '0;
      end else if (wr_en) begin
        if (w_same || w_free) begin
          valid_q[w_idx] <= 1'b1;
          id_q[w_idx]    <= wr_enroll_id;
          dev_q[w_idx]   <= wr_device_id;
          ch_q[w_idx]    <= wr_challenge;
          wr_ok          <= 1'b1;
          wr_idx         <= w_idx;
        end else begin
          wr_full <= 1'b1;
        end
      end
    end
  end

endmodule
