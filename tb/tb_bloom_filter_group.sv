// tb_bloom_filter_group: self-checking test of one Bloom filter group.
// Programs a full-block group and a 2-byte prefix group with random sets
// through a software model of the hashes, then queries stored blocks (must
// hit), blocks differing only in masked bytes (prefix group must hit) and
// random blocks (hit must equal the software model), two cycles after the
// block is applied.
module tb_bloom_filter_group;
  import bfast_pkg::*;
  import bfast_tb_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  hmat_t         d;
  logic [31:0]   block;
  logic          wr_en = 0;
  logic [0:0]    wr_bv;
  logic [8:0]    wr_addr;
  logic [31:0]   wr_data;
  logic          hit_full, hit_pre;
  int checks = 0, failures = 0;
  logic [31:0]   set_full [200];
  logic [31:0]   set_pre  [50];

  // group 0 keeps 4 bytes, group 6 keeps 2 (as in the 8-group engine)
  bloom_filter_group #(.KEEP_BYTES(4)) u_full (.clk, .block, .d,
    .wr_en(wr_en), .wr_bv, .wr_addr, .wr_data, .hit(hit_full));
  bloom_filter_group #(.KEEP_BYTES(2)) u_pre (.clk, .block, .d,
    .wr_en(wr_en), .wr_bv, .wr_addr, .wr_data, .hit(hit_pre));

  bv_shadow sh;

  task automatic query(logic [31:0] b, bit exp_full, bit exp_pre);
    @(negedge clk) block = b;
    @(posedge clk); @(posedge clk); #1;
    checks += 2;
    if (hit_full !== exp_full) begin failures++; $display("FAIL full %h %b", b, hit_full); end
    if (hit_pre !== exp_pre) begin failures++; $display("FAIL pre %h %b", b, hit_pre); end
  endtask

  initial begin
    d = random_matrix();
    sh = new(d);
    // both instances share the write port: group 0 and group 6 of the
    // shadow get the same contents, the union of both sets
    foreach (set_full[i]) begin set_full[i] = $urandom; sh.insert(0, set_full[i]); end
    foreach (set_pre[i])  begin set_pre[i]  = $urandom; sh.insert(0, group_key(6, set_pre[i])); end
    for (int v = 0; v < N_BV; v++)
      for (int i = 0; i < 512; i++) begin
        @(negedge clk);
        wr_en = 1; wr_bv = 1'(v); wr_addr = 9'(i); wr_data = sh.w[0][v][i];
      end
    @(negedge clk) wr_en = 0;
    foreach (set_full[i]) query(set_full[i], 1'b1, sh.query(0, group_key(6, set_full[i])));
    foreach (set_pre[i]) begin
      automatic logic [31:0] b = {set_pre[i][31:16], 16'($urandom)};
      query(b, sh.query(0, b), 1'b1);
    end
    for (int t = 0; t < 3000; t++) begin
      automatic logic [31:0] b = $urandom;
      query(b, sh.query(0, b), sh.query(0, group_key(6, b)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
