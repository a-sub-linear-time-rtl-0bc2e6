// tb_bit_vector_ram: self-checking test of a Bloom filter bit vector.
// Fills the whole vector with random words through the write port, then
// reads random bit pairs on both read ports and compares each with a shadow
// copy, checking the one-cycle read latency.
module tb_bit_vector_ram;
  localparam int HW = 14;
  localparam int WORDS = 1 << (HW - 5);
  logic clk = 0;
  always #5 clk = ~clk;

  logic               wr_en = 0;
  logic [HW-6:0]      wr_addr;
  logic [31:0]        wr_data;
  logic [1:0][HW-1:0] rd_addr;
  logic [1:0]         rd_bit;
  logic [31:0]        shadow [WORDS];
  int checks = 0, failures = 0, cycles = 0;

  bit_vector_ram #(.HASH_W(HW)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_bit);

  always @(posedge clk) cycles++;

  initial begin
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = (HW-5)'(w); wr_data = $urandom;
      shadow[w] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int t = 0; t < 3000; t++) begin
      logic [1:0][HW-1:0] a;
      a[0] = HW'($urandom); a[1] = HW'($urandom);
      rd_addr = a;
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rd_bit[p] !== shadow[a[p][HW-1:5]][a[p][4:0]]) begin
          failures++;
          $display("FAIL port %0d addr %0d", p, a[p]);
        end
      end
      // a write of a single word is visible on the next read
      if (t % 100 == 0) begin
        wr_en = 1; wr_addr = a[0][HW-1:5]; wr_data = ~shadow[a[0][HW-1:5]];
        shadow[a[0][HW-1:5]] = wr_data;
        @(negedge clk) wr_en = 0;
        rd_addr[0] = a[0];
        @(negedge clk);
        checks++;
        if (rd_bit[0] !== shadow[a[0][HW-1:5]][a[0][4:0]]) failures++;
      end
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
