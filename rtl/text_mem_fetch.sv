// text_mem_fetch: the TextMemoryFetch module with its text memories.
//
// Holds N_COPIES (2) text memories of 2**TEXT_AW bytes (8 kB), so the host
// can load one text while the other is scanned. Each copy is split into
// N_BANKS (4) byte-wide banks; byte address a lives in bank a[1:0] at word
// address a[TEXT_AW-1:2]. A block of four consecutive bytes starting at any
// byte address is then read in one access: banks below the byte offset read
// the next word (word address + 1), the others the current word, and the
// four bytes are rotated by the offset so that byte k of the block (bits
// 8k+7:8k) is the text byte at address + k.
//
// Ports:
//   host port   - word write (4 bytes, with byte enables) into one copy
//   scan port   - block fetch for the scanning module: address in cycle t,
//                 block valid in cycle t+1 (registered bank outputs, the
//                 rotation is combinational after them)
//   verify port - byte read for the verification module, data in cycle t+1
// The interleaving, the +1 word address and the rotation follow the design;
// the host and verify port widths are this design's choices.
module text_mem_fetch
  import bfast_pkg::*;
#(
  parameter int unsigned AW = TEXT_AW
) (
  input  logic                        clk,
  // host write port
  input  logic                        h_we,
  input  logic                        h_copy,
  input  logic [AW-3:0]               h_waddr,
  input  logic [3:0]                  h_be,
  input  logic [31:0]                 h_wdata,
  // scan port
  input  logic                        s_copy,
  input  logic [AW-1:0]               s_addr,
  output logic [8*N_BANKS-1:0]        s_block,
  // verify port
  input  logic                        v_copy,
  input  logic [AW-1:0]               v_addr,
  output logic [7:0]                  v_data
);
  // Bank b of copy c holds the bytes at addresses with a[1:0] == b.
  logic [AW-3:0]              word_addr;
  logic [1:0]                 offset;
  logic [N_BANKS-1:0][AW-3:0] bank_addr;
  assign word_addr = s_addr[AW-1:2];
  assign offset    = s_addr[1:0];
  always_comb
    for (int b = 0; b < N_BANKS; b++)
      bank_addr[b] = (b < int'(offset)) ? word_addr + 1'b1 : word_addr;

  logic [N_COPIES-1:0][N_BANKS-1:0][7:0] s_q, v_q;
  for (genvar c = 0; c < N_COPIES; c++) begin : g_copy
    for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
      text_bank #(.AW(AW - 2)) u_bank (
        .clk,
        .we    (h_we && h_be[b] && (h_copy == c)),
        .waddr (h_waddr),
        .wdata (h_wdata[8*b +: 8]),
        .s_addr(bank_addr[b]),
        .s_data(s_q[c][b]),
        .v_addr(v_addr[AW-1:2]),
        .v_data(v_q[c][b]));
    end
  end

  logic       s_copy_q, v_copy_q;
  logic [1:0] offset_q, v_off_q;
  always_ff @(posedge clk) begin
    s_copy_q <= s_copy;
    offset_q <= offset;
    v_copy_q <= v_copy;
    v_off_q  <= v_addr[1:0];
  end

  // Rotate: byte k of the block comes from bank (offset + k) mod 4.
  always_comb
    for (int k = 0; k < N_BANKS; k++)
      s_block[8*k +: 8] = s_q[s_copy_q][2'(k + int'(offset_q))];

  assign v_data = v_q[v_copy_q][v_off_q];
endmodule
