// tb_host_interface: self-checking test of the register/memory map.
// Checks the decode of text, hash matrix and bit vector writes onto their
// output ports, command and status registers, hash matrix read-back, the
// start of scans on the two copies (alternating, finish bit and enable
// handling) and the virus index memory filled by verification reports.
module tb_host_interface;
  import bfast_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0] bus_addr = '0;
  logic        bus_we = 0, bus_re = 0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic        bus_rack;
  logic [N_HASH-1:0][31:0][HASH_W-1:0] d;
  logic        bv_we;
  logic [2:0]  bv_group;
  logic [0:0]  bv_sel;
  logic [8:0]  bv_addr;
  logic [31:0] bv_wdata;
  logic        txt_we, txt_copy;
  logic [TEXT_AW-3:0] txt_waddr;
  logic [31:0] txt_wdata;
  logic        scan_start, scan_copy, scan_busy = 0, scan_done = 0;
  logic [TEXT_AW-1:0] scan_len;
  logic        vr_valid = 0, vr_copy = 0;
  logic [15:0] vr_id = '0;
  int checks = 0, failures = 0;

  host_interface dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [15:0] a, logic [31:0] v);
    @(negedge clk); bus_addr = a; bus_wdata = v; bus_we = 1;
    #1;
  endtask
  task automatic wr_end();
    @(negedge clk) bus_we = 0;
    #1;
  endtask
  task automatic rd(logic [15:0] a, output logic [31:0] v);
    @(negedge clk); bus_addr = a; bus_re = 1;
    @(negedge clk); bus_re = 0;
    chk(bus_rack === 1'b1, "read ack");
    v = bus_rdata;
  endtask

  initial begin
    logic [31:0] v;
    logic [HASH_W-1:0] dm [N_HASH][32];
    repeat (2) @(negedge clk);
    rst = 0;
    // text writes: copy 0 and copy 1
    wr(16'h1010 + 16'd40, 32'h11223344);
    chk(txt_we && !txt_copy && txt_waddr == 10 && txt_wdata == 32'h11223344, "text copy 0 decode");
    chk(!bv_we, "no bv write on text access");
    wr(16'h3010 + 16'd8188, 32'h55667788);
    chk(txt_we && txt_copy && txt_waddr == 2047, "text copy 1 decode");
    // bit vector writes: group 5, bit vector 1, word 300
    wr(16'h5110 + 16'(((5 * 2 + 1) * 512 + 300) * 4), 32'hCAFEF00D);
    chk(bv_we && bv_group == 5 && bv_sel == 1 && bv_addr == 300 && bv_wdata == 32'hCAFEF00D, "bv decode");
    chk(!txt_we, "no text write on bv access");
    wr(16'h5110 + 16'(((7 * 2 + 1) * 512 + 511) * 4), 32'h1);
    chk(bv_we && bv_group == 7 && bv_sel == 1 && bv_addr == 511, "last bv word decode");
    wr_end();
    chk(!bv_we && !txt_we, "idle");
    // hash matrix
    for (int k = 0; k < N_HASH; k++)
      for (int i = 0; i < 32; i++) dm[k][i] = HASH_W'($urandom);
    for (int w = 0; w < 64; w++)
      wr(16'h5010 + 16'(4 * w), {2'b11, dm[w / 16][2 * (w % 16) + 1], 2'b11, dm[w / 16][2 * (w % 16)]});
    wr_end();
    for (int k = 0; k < N_HASH; k++)
      for (int i = 0; i < 32; i++) chk(d[k][i] == dm[k][i], "hash matrix entry");
    rd(16'h5010 + 16'd4 * 16'd21, v);
    chk(v == {2'b0, dm[1][11], 2'b0, dm[1][10]}, "hash matrix read back");
    // commands: enable copy 1 first, then copy 0
    wr(16'h0004, 32'h8000_0000 | 32'd777); wr_end();
    chk(scan_start && scan_copy == 1'b1 && scan_len == 777, "start copy 1");
    @(negedge clk) scan_busy = 1;
    wr(16'h0000, 32'h8000_0000 | 32'd1234); wr_end();
    chk(!scan_start, "no start while busy");
    rd(16'h0004, v);
    chk(v == (32'h8000_0000 | 32'd777), "command read back");
    // two virus reports for copy 1
    @(negedge clk); vr_valid = 1; vr_copy = 1; vr_id = 16'hBEEF;
    @(negedge clk); vr_id = 16'h0042;
    @(negedge clk); vr_valid = 0;
    @(negedge clk); scan_busy = 0; scan_done = 1;
    #1 chk(!scan_start, "no start in done cycle");
    @(negedge clk); scan_done = 0;
    #1 chk(scan_start && scan_copy == 1'b0 && scan_len == 1234, "start copy 0 next");
    @(negedge clk) scan_busy = 1;
    rd(16'h000C, v);
    chk(v == 32'h8000_0002, "status copy 1: finished, 2 viruses");
    rd(16'h0008, v);
    chk(v == 32'h0, "status copy 0: running");
    rd(16'h0810, v);
    chk(v == 32'h0042BEEF, "virus index copy 1");
    rd(16'h0004, v);
    chk(v[31] == 1'b0, "enable cleared after scan");
    @(negedge clk); scan_busy = 0; scan_done = 1;
    @(negedge clk); scan_done = 0;
    #1 chk(!scan_start, "no start without enable");
    rd(16'h0008, v);
    chk(v == 32'h8000_0000, "status copy 0 finished");
    // re-enable clears the status
    wr(16'h000C - 16'd8 + 16'd0, 32'h8000_0010); wr_end();
    rd(16'h000C, v);
    chk(v == 32'h0, "status cleared by new command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
