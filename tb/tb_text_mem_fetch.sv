// tb_text_mem_fetch: self-checking test of the interleaved text memory fetch.
// Loads both copies with random text through the word write port (some
// writes with partial byte enables), then fetches 4-byte blocks at random
// byte addresses of every offset on the scan port and single bytes on the
// verify port, each compared one cycle later with a shadow of the text.
// Also checks the example of the design: bytes A..H at addresses 0..7,
// a fetch at address 1 gives B, C, D, E.
module tb_text_mem_fetch;
  import bfast_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int SZ = 1 << TEXT_AW;

  logic        h_we = 0, h_copy, s_copy, v_copy;
  logic [TEXT_AW-3:0] h_waddr;
  logic [3:0]  h_be;
  logic [31:0] h_wdata;
  logic [TEXT_AW-1:0] s_addr, v_addr;
  logic [31:0] s_block;
  logic [7:0]  v_data;
  logic [7:0]  txt [2][SZ];
  int checks = 0, failures = 0;

  text_mem_fetch dut (.*);

  task automatic wr(int c, int w, logic [3:0] be, logic [31:0] dat);
    @(negedge clk);
    h_we = 1; h_copy = 1'(c); h_waddr = (TEXT_AW-2)'(w); h_be = be; h_wdata = dat;
    for (int b = 0; b < 4; b++) if (be[b]) txt[c][4*w + b] = dat[8*b +: 8];
    @(negedge clk) h_we = 0;
  endtask

  initial begin
    for (int c = 0; c < 2; c++)
      for (int w = 0; w < SZ / 4; w++) wr(c, w, 4'hF, $urandom);
    for (int t = 0; t < 200; t++)
      wr($urandom_range(0, 1), $urandom_range(0, SZ / 4 - 1), 4'($urandom), $urandom);
    wr(0, 0, 4'hF, {"D", "C", "B", "A"});
    wr(0, 1, 4'hF, {"H", "G", "F", "E"});
    @(negedge clk) s_copy = 0; s_addr = 1;
    @(negedge clk);
    checks++;
    if (s_block !== {"E", "D", "C", "B"}) begin failures++; $display("FAIL example %h", s_block); end
    for (int t = 0; t < 4000; t++) begin
      automatic int c = $urandom_range(0, 1);
      automatic int a = (t < 8) ? (SZ - 8 + t) : $urandom_range(0, SZ - 1);
      automatic int vc = $urandom_range(0, 1);
      automatic int va = $urandom_range(0, SZ - 1);
      automatic logic [31:0] exp;
      for (int k = 0; k < 4; k++) exp[8*k +: 8] = txt[c][(a + k) % SZ];
      @(negedge clk);
      s_copy = 1'(c); s_addr = TEXT_AW'(a); v_copy = 1'(vc); v_addr = TEXT_AW'(va);
      @(negedge clk);
      checks += 2;
      if (s_block !== exp) begin failures++; $display("FAIL scan %0d %0d %h %h", c, a, s_block, exp); end
      if (v_data !== txt[vc][va]) begin failures++; $display("FAIL verify %0d", va); end
    end
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
