// bfast_pkg: constants and types shared by the BFAST string matching engine.
//
// The engine scans a text with a search window of WIN_SIZE bytes and a
// suffix block of BLOCK_BYTES bytes. The window shift is derived from which
// of N_GROUPS Bloom filters the block hits (group i holds the blocks found i
// bytes before the end of the pattern prefixes). The default sizes are the
// implemented configuration: 4-byte blocks, 8 Bloom filter groups, 14-bit
// hash values into 16 kbit bit vectors, four hash functions per group, two
// 8 kB text memories, a 512-entry verification job buffer and four text
// segments in flight. The window of 8 bytes is inferred from the 8 groups and
// from the segment overlap example (segments 0~9, 3~19, ... for 40 bytes).
package bfast_pkg;

  // Search window and block.
  localparam int unsigned BLOCK_BYTES = 4;
  localparam int unsigned WIN_SIZE    = 8;
  localparam int unsigned N_GROUPS    = WIN_SIZE;       // G0 .. G(WIN_SIZE-1)
  localparam int unsigned SHIFT_W     = $clog2(WIN_SIZE + 1);

  // Bloom filters.
  localparam int unsigned HASH_W      = 14;             // 16384-bit vector
  localparam int unsigned N_HASH      = 4;              // two per dual-port RAM
  localparam int unsigned N_BV        = N_HASH / 2;     // bit vectors per group

  // Text memory: 8 kB per copy, four interleaved byte banks.
  localparam int unsigned TEXT_AW     = 13;
  localparam int unsigned N_BANKS     = BLOCK_BYTES;
  localparam int unsigned N_COPIES    = 2;

  // Verification job buffer: one 16 kbit RAM of 32-bit descriptors.
  localparam int unsigned VJB_AW      = 9;

  // Text segments scanned in an interleaved way (pipeline depth).
  localparam int unsigned N_SEG       = 4;

  // Verification job descriptor (32 bits).
  typedef struct packed {
    logic                alloc;     // [31]    set while the entry holds a job
    logic [1:0]          tx_no;     // [30:29] text copy of the job
    logic [TEXT_AW-1:0]  text_pos;  // [28:16] start of the suspicious window
    logic [2:0]          reserved;  // [15:13]
    logic [TEXT_AW-1:0]  length;    // [12:0]  length of the scanned text
  } vjd_t;

  // Text position controller states (one FSM per text segment).
  typedef enum logic [2:0] {
    ST_INIT = 3'd0,   // idle or finished segment
    ST_SCAN = 3'd1,   // ordinary shift of the window
    ST_VERI = 3'd2,   // additional checking of preceding blocks
    ST_VEND = 3'd3,   // checking finished, window moved past stored position
    ST_HOLD = 3'd4    // potential match waiting for a free VJB entry
  } tpc_state_t;

endpackage
