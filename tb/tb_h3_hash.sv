// tb_h3_hash: self-checking test of the H3 hash.
// Random keys and matrices; the expected hash is computed bit-column by
// bit-column (output bit b = parity of key AND column b of the matrix), and
// the linearity h(a ^ b) = h(a) ^ h(b) of the class is checked as well.
module tb_h3_hash;
  localparam int KW = 32, HW = 14;
  logic [KW-1:0]         key;
  logic [KW-1:0][HW-1:0] d;
  logic [HW-1:0]         hash;
  int checks = 0, failures = 0;

  h3_hash #(.KEY_W(KW), .HASH_W(HW)) dut (.key, .d, .hash);

  function automatic logic [HW-1:0] ref_hash(logic [KW-1:0] k, logic [KW-1:0][HW-1:0] m);
    logic [HW-1:0] r;
    for (int b = 0; b < HW; b++) begin
      logic [KW-1:0] col;
      for (int i = 0; i < KW; i++) col[i] = m[i][b];
      r[b] = ^(k & col);
    end
    return r;
  endfunction

  initial begin
    logic [HW-1:0] ha, hb;
    logic [KW-1:0] a, b;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < KW; i++) d[i] = HW'($urandom);
      key = $urandom; #1;
      checks++;
      if (hash !== ref_hash(key, d)) begin
        failures++;
        $display("FAIL key=%h hash=%h exp=%h", key, hash, ref_hash(key, d));
      end
      a = $urandom; b = $urandom;
      key = a; #1; ha = hash;
      key = b; #1; hb = hash;
      key = a ^ b; #1;
      checks++;
      if (hash !== (ha ^ hb)) failures++;
    end
    key = '0; #1; checks++;
    if (hash !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
