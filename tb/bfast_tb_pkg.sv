// bfast_tb_pkg: reference functions shared by the testbenches.
// A software model of the H3 hash, of the key a Bloom filter group hashes
// (blocks of short-prefix groups keep only their last bytes) and of a
// programmed set of bit vectors, all written independently of the RTL.
package bfast_tb_pkg;
  import bfast_pkg::*;

  typedef logic [N_HASH-1:0][8*BLOCK_BYTES-1:0][HASH_W-1:0] hmat_t;

  // Hash k of key: XOR of the matrix rows selected by the set key bits.
  function automatic int unsigned ref_h3(hmat_t m, int k, logic [31:0] key);
    int unsigned r = 0;
    for (int i = 0; i < 32; i++)
      if (key[i]) r = r ^ int'(m[k][i]);
    return r;
  endfunction

  // Number of block bytes that group g compares.
  function automatic int keep_bytes(int g);
    return (g <= int'(WIN_SIZE - BLOCK_BYTES)) ? BLOCK_BYTES : WIN_SIZE - g;
  endfunction

  function automatic logic [31:0] group_key(int g, logic [31:0] blk);
    logic [31:0] r = blk;
    for (int b = 0; b < BLOCK_BYTES - keep_bytes(g); b++) r[8*b +: 8] = 8'h00;
    return r;
  endfunction

  function automatic hmat_t random_matrix();
    hmat_t m;
    for (int k = 0; k < N_HASH; k++)
      for (int i = 0; i < 32; i++) m[k][i] = HASH_W'($urandom);
    return m;
  endfunction

  // Shadow of all bit vectors: [group][bit vector][word].
  class bv_shadow;
    logic [31:0] w [N_GROUPS][N_BV][1 << (HASH_W - 5)];
    hmat_t m;
    function new(hmat_t mat);
      m = mat;
      foreach (w[g, v, i]) w[g][v][i] = '0;
    endfunction
    function void insert(int g, logic [31:0] blk);
      logic [31:0] key = group_key(g, blk);
      for (int k = 0; k < N_HASH; k++) begin
        int unsigned h = ref_h3(m, k, key);
        w[g][k/2][h >> 5][h & 31] = 1'b1;
      end
    endfunction
    function bit query(int g, logic [31:0] blk);
      logic [31:0] key = group_key(g, blk);
      for (int k = 0; k < N_HASH; k++) begin
        int unsigned h = ref_h3(m, k, key);
        if (!w[g][k/2][h >> 5][h & 31]) return 0;
      end
      return 1;
    endfunction
  endclass
endpackage
