// text_bank: one byte-wide bank of a text memory (one 16 kbit block RAM).
//
// 2**AW bytes with a write port and two synchronous read ports: port s for
// the scanning module's block fetch and port v for the verification module.
// Read data appears one cycle after the address.
module text_bank #(
  parameter int unsigned AW = 11
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic [AW-1:0] s_addr,
  output logic [7:0]    s_data,
  input  logic [AW-1:0] v_addr,
  output logic [7:0]    v_data
);
  logic [7:0] mem [1 << AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    s_data <= mem[s_addr];
    v_data <= mem[v_addr];
  end
endmodule
