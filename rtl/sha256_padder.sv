// sha256_padder: SHA-256 message pre-processing (length field and padding).
//
// Turns a message of any length up to MAX_BITS into 512-bit blocks. The
// message is the low `msg_len` bits of `msg`, its first bit being
// msg[msg_len-1]. The padded stream is the message, a single 1 bit, zeros,
// and the message length as a 64-bit number, cut into
// nblocks = floor((msg_len + 64) / 512) + 1 blocks. The block selected by
// `blk_idx` (0 = first) appears on `block`. Purely combinational.
//
// Length handling and zero padding are the two parts the document names
// for its pre-processing stage; the selectable-block interface is this
// design's choice.
module sha256_padder #(
  parameter int unsigned MAX_BITS = 448,
  localparam int unsigned LEN_W   = $clog2(MAX_BITS + 1),
  localparam int unsigned MAX_BLK = (MAX_BITS + 64) / 512 + 1,
  localparam int unsigned IDX_W   = (MAX_BLK > 1) ? $clog2(MAX_BLK) : 1
) (
  input  logic [MAX_BITS-1:0] msg,
  input  logic [LEN_W-1:0]    msg_len,
  input  logic [IDX_W-1:0]    blk_idx,
  output logic [IDX_W:0]      nblocks,
  output logic [511:0]        block
);

  localparam int unsigned SB = MAX_BLK * 512;   // longest padded stream

  logic [SB-1:0] masked, stream, one_bit, mask;
  logic [31:0]   total, shift;

  always_comb begin
    nblocks = (IDX_W + 1)'((32'(msg_len) + 32'd64) / 32'd512 + 32'd1);
    total   = 32'(nblocks) * 32'd512;
    shift   = total - 32'(msg_len);
    mask    = ({{(SB-1){1'b0}}, 1'b1} << msg_len) - 1'b1;
    masked  = SB'(msg) & mask;
    one_bit = {{(SB-1){1'b0}}, 1'b1} << (shift - 32'd1);
    stream  = (masked << shift) | one_bit | SB'(msg_len);
    block   = 512'(stream >> (32'd512 * (32'(nblocks) - 32'd1 - 32'(blk_idx))));
  end

endmodule
