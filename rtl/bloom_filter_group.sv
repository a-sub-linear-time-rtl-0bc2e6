// bloom_filter_group: one Bloom filter group of the BloomFilterQuery module.
//
// The 32-bit block is hashed by N_HASH (4) H3 hash functions. Hash values are
// registered, then looked up in N_HASH/2 (2) bit vectors with two read ports
// each: hashes 0 and 1 go to bit vector 0, hashes 2 and 3 to bit vector 1.
// The group hits when all N_HASH looked-up bits are set.
//
// Groups that hold pattern prefixes shorter than a block (groups i with
// i > WIN_SIZE - BLOCK_BYTES) compare only the last KEEP_BYTES bytes of the
// block with those prefixes, so the other bytes are cleared before hashing;
// the host programs such a group with the same masked hash. Byte k of the
// block (bits 8k+7:8k) is the text byte at block address + k, so the kept
// bytes are the upper ones. The masking is this design's reading of the
// grouping rule for short prefixes; the original design does not say how hardware
// handles them.
//
// Timing: block in cycle t (already registered by the text fetch), hash
// registered at the end of t, bits read at the end of t+1, hit valid
// (combinational AND of the RAM outputs) in cycle t+2.
module bloom_filter_group
  import bfast_pkg::*;
#(
  parameter int unsigned KEEP_BYTES = BLOCK_BYTES,
  parameter int unsigned HASH_BITS  = HASH_W
) (
  input  logic                                 clk,
  input  logic [8*BLOCK_BYTES-1:0]             block,
  input  logic [N_HASH-1:0][8*BLOCK_BYTES-1:0][HASH_BITS-1:0] d,
  // host write port into the bit vectors
  input  logic                                 wr_en,
  input  logic [$clog2(N_BV)-1:0]              wr_bv,
  input  logic [HASH_BITS-6:0]                 wr_addr,
  input  logic [31:0]                          wr_data,
  output logic                                 hit
);
  localparam int unsigned KEY_W = 8 * BLOCK_BYTES;

  logic [KEY_W-1:0] key;
  always_comb begin
    key = block;
    for (int b = 0; b < int'(BLOCK_BYTES - KEEP_BYTES); b++)
      key[8*b +: 8] = 8'h00;
  end

  logic [N_HASH-1:0][HASH_BITS-1:0] h, h_q;
  for (genvar k = 0; k < N_HASH; k++) begin : g_hash
    h3_hash #(.KEY_W(KEY_W), .HASH_W(HASH_BITS)) u_hash (
      .key(key), .d(d[k]), .hash(h[k]));
  end

  always_ff @(posedge clk) h_q <= h;

  logic [N_BV-1:0][1:0] bits;
  for (genvar v = 0; v < N_BV; v++) begin : g_bv
    bit_vector_ram #(.HASH_W(HASH_BITS)) u_bv (
      .clk    (clk),
      .wr_en  (wr_en && (wr_bv == v)),
      .wr_addr(wr_addr),
      .wr_data(wr_data),
      .rd_addr({h_q[2*v+1], h_q[2*v]}),
      .rd_bit (bits[v]));
  end

  assign hit = &bits;
endmodule
