// hsm_key_memory: the HSM's protected memory of per-IC secrets.
//
// One record per entry of the IC database (same index): the hash of the
// genuine device's PUF response, the header of the block the IC was
// recorded in, the enroll IDs of its tester and system integrator, the
// logic key that unlocks the obfuscated IC, the JTAG access key, and the
// IC's life-cycle stage. Records are written whole at registration; the
// stage can be updated on its own when access is granted.
//
// Interface: synchronous writes (`wr_en`, `stage_en`), combinational read
// of record `rd_idx`. A record written and a stage updated in the same
// cycle for the same entry take the record's write, stage included.
//
// The contents follow the document's memory of device ID, logic key and
// JTAG access key; the tester and integrator IDs are the "stored in memory"
// IDs of its access algorithm. Widths and depth are this design's choices.
module hsm_key_memory
  import hsm_pkg::*;
#(
  parameter int unsigned DEPTH = NUM_IC,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [IW-1:0] wr_idx,
  input  ic_record_t wr_rec,
  input  logic       stage_en,
  input  logic [IW-1:0] stage_idx,
  input  ip_stage_t  stage_val,
  input  logic [IW-1:0] rd_idx,
  output ic_record_t rd_rec,
  output ip_stage_t  rd_stage
);

  ic_record_t mem   [DEPTH];
  ip_stage_t  stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        mem[i]   <= '0;
        stage[i] <= STAGE_NONE;
      end
    end else begin
      if (stage_en) stage[stage_idx] <= stage_val;
      if (wr_en) begin
        mem[wr_idx]   <= wr_rec;
        stage[wr_idx] <= STAGE_REGISTERED;
      end
    end
  end

  assign rd_rec   = mem[rd_idx];
  assign rd_stage = stage[rd_idx];

endmodule
