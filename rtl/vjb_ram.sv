// vjb_ram: the VerificationJobBuffer.
//
// A true dual-port RAM of 2**AW 32-bit verification job descriptors (one
// 16 kbit block RAM: 512 entries). Port A belongs to the job dispatcher
// (wea/addra/dina/douta), port B to the verification module
// (web/addrb/dinb/doutb), as in the block diagram. Both ports read
// synchronously (data one cycle after the address, read-before-write on the
// same port). If both ports write the same entry in one cycle, port A wins;
// the protocol never does this, since the dispatcher only writes free
// entries and the verification module only clears allocated ones. The RAM
// powers up with every entry free, as a block RAM with zero initial
// contents does; there is no reset sweep.
module vjb_ram #(
  parameter int unsigned AW = 9
) (
  input  logic          clk,
  input  logic          wea,
  input  logic [AW-1:0] addra,
  input  logic [31:0]   dina,
  output logic [31:0]   douta,
  input  logic          web,
  input  logic [AW-1:0] addrb,
  input  logic [31:0]   dinb,
  output logic [31:0]   doutb
);
  logic [31:0] mem [1 << AW];

  // Power-up contents: all entries free (block RAM initial value).
  initial
    for (int i = 0; i < (1 << AW); i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (web && !(wea && addra == addrb)) mem[addrb] <= dinb;
    if (wea) mem[addra] <= dina;
    douta <= mem[addra];
    doutb <= mem[addrb];
  end
endmodule
