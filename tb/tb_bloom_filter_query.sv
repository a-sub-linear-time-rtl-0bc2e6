// tb_bloom_filter_query: self-checking test of the parallel Bloom filter query.
// Builds the eight groups from random 8-byte pattern prefixes (group i holds
// the block ending i bytes before the prefix end; groups 5..7 the prefixes of
// 3, 2 and 1 bytes), programs them through a software model, and checks the
// hit vector two cycles after each block: pattern blocks must hit their
// group, and for random blocks every hit bit must equal the model.
module tb_bloom_filter_query;
  import bfast_pkg::*;
  import bfast_tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  hmat_t             d;
  logic [31:0]       block;
  logic              wr_en = 0;
  logic [2:0]        wr_group;
  logic [0:0]        wr_bv;
  logic [8:0]        wr_addr;
  logic [31:0]       wr_data;
  logic [N_GROUPS-1:0] hits;
  int checks = 0, failures = 0;
  localparam int NP = 300;
  logic [7:0] pat [NP][WIN_SIZE];

  bloom_filter_query dut (.clk, .block, .d, .wr_en, .wr_group, .wr_bv,
                          .wr_addr, .wr_data, .hits);
  bv_shadow sh;

  // block of group g taken from pattern p (byte k = lowest address + k)
  function automatic logic [31:0] pat_block(int p, int g);
    logic [31:0] r = '0;
    int kb = keep_bytes(g);
    for (int k = BLOCK_BYTES - kb; k < BLOCK_BYTES; k++)
      r[8*k +: 8] = (g <= int'(WIN_SIZE - BLOCK_BYTES))
                    ? pat[p][WIN_SIZE - BLOCK_BYTES - g + k]
                    : pat[p][k - (BLOCK_BYTES - kb)];
    return r;
  endfunction

  task automatic query(logic [31:0] b, int must_hit);
    @(negedge clk) block = b;
    @(posedge clk); @(posedge clk); #1;
    for (int g = 0; g < N_GROUPS; g++) begin
      checks++;
      if (hits[g] !== sh.query(g, b) || (g == must_hit && !hits[g])) begin
        failures++;
        $display("FAIL block %h group %0d hit %b", b, g, hits[g]);
      end
    end
  endtask

  initial begin
    d = random_matrix();
    sh = new(d);
    for (int p = 0; p < NP; p++)
      for (int k = 0; k < WIN_SIZE; k++) pat[p][k] = 8'($urandom);
    for (int p = 0; p < NP; p++)
      for (int g = 0; g < N_GROUPS; g++) sh.insert(g, pat_block(p, g));
    for (int g = 0; g < N_GROUPS; g++)
      for (int v = 0; v < N_BV; v++)
        for (int i = 0; i < 512; i++) begin
          @(negedge clk);
          wr_en = 1; wr_group = 3'(g); wr_bv = 1'(v); wr_addr = 9'(i);
          wr_data = sh.w[g][v][i];
        end
    @(negedge clk) wr_en = 0;
    for (int p = 0; p < NP; p += 3)
      for (int g = 0; g < N_GROUPS; g++) begin
        automatic logic [31:0] b = pat_block(p, g);
        // a prefix group ignores the leading bytes of the text block
        if (g > int'(WIN_SIZE - BLOCK_BYTES))
          for (int k = 0; k < BLOCK_BYTES - keep_bytes(g); k++) b[8*k +: 8] = 8'($urandom);
        query(b, g);
      end
    for (int t = 0; t < 2000; t++) query($urandom, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
