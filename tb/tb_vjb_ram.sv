// tb_vjb_ram: self-checking test of the verification job buffer RAM.
// Checks that it powers up empty, then runs random reads and writes on both
// ports against a shadow array, with one-cycle read latency on each port.
module tb_vjb_ram;
  localparam int AW = 9;
  logic clk = 0;
  always #5 clk = ~clk;
  logic          wea = 0, web = 0;
  logic [AW-1:0] addra = '0, addrb = '0;
  logic [31:0]   dina = '0, dinb = '0, douta, doutb;
  logic [31:0]   shadow [1 << AW];
  int checks = 0, failures = 0;

  vjb_ram #(.AW(AW)) dut (.*);

  initial begin
    for (int i = 0; i < (1 << AW); i++) shadow[i] = '0;
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk) addra = AW'(i);
      @(negedge clk);
      checks++;
      if (douta !== 32'd0) failures++;
    end
    for (int t = 0; t < 5000; t++) begin
      logic [AW-1:0] aa, ab;
      logic [31:0]   ea, eb;
      @(negedge clk);
      aa = AW'($urandom_range(0, 15)); ab = AW'($urandom_range(0, 15));
      addra = aa; addrb = ab;
      wea = ($urandom_range(0, 2) == 0);
      web = ($urandom_range(0, 2) == 0) && !(wea && aa == ab);
      dina = $urandom; dinb = $urandom;
      ea = shadow[aa]; eb = shadow[ab];
      @(posedge clk);
      if (web) shadow[ab] = dinb;
      if (wea) shadow[aa] = dina;
      #1;
      checks += 2;
      if (douta !== ea) begin failures++; $display("FAIL A %0d %h %h", aa, douta, ea); end
      if (doutb !== eb) begin failures++; $display("FAIL B %0d %h %h", ab, doutb, eb); end
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
