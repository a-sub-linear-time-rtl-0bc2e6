// bit_vector_ram: one M-bit vector of a Bloom filter.
//
// A 2**HASH_W bit array (16384 bits by default, one 16 kbit dual-port block
// RAM) with two independent single-bit read ports, so two hash functions can
// be looked up in the same cycle. The array is stored as 32-bit words: the
// host loads it one word at a time through the write port (word address =
// bit index / 32, bit index % 32 = bit position in the word), as it does
// before a scan starts. Reads are synchronous: the bit addressed in cycle t
// appears on rd_bit in cycle t+1 (block RAM output register).
//
// The word-wide host port is this design's choice; the original design only says
// each RAM is configured one bit wide and 16 kbit long and read on two ports.
module bit_vector_ram #(
  parameter int unsigned HASH_W = 14
) (
  input  logic                   clk,
  // host write port
  input  logic                   wr_en,
  input  logic [HASH_W-6:0]      wr_addr,
  input  logic [31:0]            wr_data,
  // two read ports
  input  logic [1:0][HASH_W-1:0] rd_addr,
  output logic [1:0]             rd_bit
);
  localparam int unsigned WORDS = 1 << (HASH_W - 5);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  for (genvar p = 0; p < 2; p++) begin : g_port
    always_ff @(posedge clk)
      rd_bit[p] <= mem[rd_addr[p][HASH_W-1:5]][rd_addr[p][4:0]];
  end
endmodule
