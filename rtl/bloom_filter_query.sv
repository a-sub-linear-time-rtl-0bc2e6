// bloom_filter_query: the BloomFilterQuery module of the scanning module.
//
// N_GROUPS Bloom filter groups receive the same fetched block and are
// queried in parallel; hits[i] reports that the block may belong to group i,
// i.e. it may occur i bytes before the end of a pattern prefix of WIN_SIZE
// bytes. Groups 0 .. WIN_SIZE-BLOCK_BYTES hold whole blocks; the remaining
// groups hold the prefixes of WIN_SIZE-i bytes and match only that many last
// bytes of the block. All groups share the N_HASH hash functions (one hash
// matrix d); each has its own bit vectors, written by the host through
// wr_group / wr_bv / wr_addr.
//
// Timing: block valid in cycle t, hits valid in cycle t+2 (see
// bloom_filter_group). The priority encoding of the hits into a shift
// distance is done in the text position controller, as in the design.
module bloom_filter_query
  import bfast_pkg::*;
#(
  parameter int unsigned HASH_BITS = HASH_W
) (
  input  logic                                 clk,
  input  logic [8*BLOCK_BYTES-1:0]             block,
  input  logic [N_HASH-1:0][8*BLOCK_BYTES-1:0][HASH_BITS-1:0] d,
  input  logic                                 wr_en,
  input  logic [$clog2(N_GROUPS)-1:0]          wr_group,
  input  logic [$clog2(N_BV)-1:0]              wr_bv,
  input  logic [HASH_BITS-6:0]                 wr_addr,
  input  logic [31:0]                          wr_data,
  output logic [N_GROUPS-1:0]                  hits
);
  for (genvar g = 0; g < N_GROUPS; g++) begin : g_grp
    localparam int unsigned KEEP =
      (g <= WIN_SIZE - BLOCK_BYTES) ? BLOCK_BYTES : WIN_SIZE - g;
    bloom_filter_group #(.KEEP_BYTES(KEEP), .HASH_BITS(HASH_BITS)) u_grp (
      .clk    (clk),
      .block  (block),
      .d      (d),
      .wr_en  (wr_en && (wr_group == g)),
      .wr_bv  (wr_bv),
      .wr_addr(wr_addr),
      .wr_data(wr_data),
      .hit    (hits[g]));
  end
endmodule
