// tb_job_dispatcher: self-checking test of the job dispatcher with the VJB.
// A random requester asks for jobs; a model verification module serves the
// VJB entries in order on port B, slowly enough that the buffer fills. Every
// descriptor read back must equal the request accepted for it, in order,
// with the allocation bit set; while all entries are allocated the
// dispatcher must not be ready, and it must become ready again after one
// entry is freed. The buffer must fill and the pointer wrap at least once.
module tb_job_dispatcher;
  import bfast_pkg::*;
  localparam int AW = 4;                 // 16 entries keeps the test short
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic               req = 0, ready;
  logic [1:0]         tx_no;
  logic [TEXT_AW-1:0] text_pos, length;
  logic               wea, web = 0;
  logic [AW-1:0]      addra, addrb = '0;
  logic [31:0]        dina, douta, dinb = '0, doutb, jobs;
  int checks = 0, failures = 0, full_seen = 0, wraps = 0;
  vjd_t q [$];
  bit   slow = 1;

  job_dispatcher #(.AW(AW)) dut (.clk, .rst, .req, .tx_no, .text_pos, .length,
    .ready, .wea, .addra, .dina, .douta, .jobs);
  vjb_ram #(.AW(AW)) u_vjb (.clk, .wea, .addra, .dina, .douta, .web, .addrb, .dinb, .doutb);

  // requester
  always @(negedge clk) if (!rst) begin
    req      = ($urandom_range(0, 3) != 0);
    tx_no    = 2'($urandom);
    text_pos = TEXT_AW'($urandom);
    length   = TEXT_AW'($urandom);
  end
  always @(posedge clk) if (!rst && wea) begin
    vjd_t v;
    v = '0; v.alloc = 1; v.tx_no = tx_no; v.text_pos = text_pos; v.length = length;
    q.push_back(v);
    if (addra == '1) wraps++;
  end

  // count cycles in which every entry is allocated; the dispatcher must not be ready
  always @(posedge clk) if (!rst && q.size() == (1 << AW)) begin
    full_seen++;
    checks++;
    if (ready) begin failures++; $display("FAIL ready while full"); end
  end

  // verification module model: poll entry, check, clear, next
  initial begin
    vjd_t exp;
    @(negedge clk) rst = 0;
    repeat (40) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      do begin
        @(negedge clk); web = 0;
        @(negedge clk);
      end while (!doutb[31]);
      if (slow) repeat ($urandom_range(2, 12)) @(negedge clk);
      exp = q.pop_front();
      checks++;
      if (doutb !== 32'(exp)) begin failures++; $display("FAIL job %0d %h %h", n, doutb, exp); end
      web = 1; dinb = '0;
      @(negedge clk); web = 0; addrb = addrb + 1'b1;
      if (n == 120) slow = 0;
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL buffer never full"); end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL pointer never wrapped"); end
    checks++;
    if (jobs < 200) failures++;
    $display("full cycles %0d wraps %0d", full_seen, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
