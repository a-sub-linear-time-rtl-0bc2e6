// job_dispatcher: the JobDispatcher of the verification interface.
//
// Keeps a pointer to the next verification job buffer (VJB) entry and reads
// that entry on port A every cycle. The entry is free when its allocation
// bit (bit 31) is clear; a free entry makes the dispatcher ready. When the
// scanning module requests a job (req) while the dispatcher is ready, the
// descriptor {alloc=1, tx_no, text_pos, length} is written to the entry and
// the pointer moves on, wrapping at the end of the buffer. Finding the
// allocation bit set at the pointer means the buffer is full: ready stays
// low until the verification module clears that entry. The verification
// module must therefore serve the entries in pointer order.
//
// Timing: req and ready are in the same cycle (req is accepted when
// req && ready). The read of the new entry after a write takes one cycle,
// so ready is low in the cycle after each accepted job.
module job_dispatcher
  import bfast_pkg::*;
#(
  parameter int unsigned AW = VJB_AW
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                req,
  input  logic [1:0]          tx_no,
  input  logic [TEXT_AW-1:0]  text_pos,
  input  logic [TEXT_AW-1:0]  length,
  output logic                ready,
  // VJB port A
  output logic                wea,
  output logic [AW-1:0]       addra,
  output logic [31:0]         dina,
  input  logic [31:0]         douta,
  // number of jobs issued (wraps)
  output logic [31:0]         jobs
);
  logic [AW-1:0] ptr;
  logic          rd_valid;     // douta holds the entry at ptr
  vjd_t          vjd;

  assign addra = ptr;
  assign ready = rd_valid && !douta[31];
  assign wea   = req && ready;

  always_comb begin
    vjd          = '0;
    vjd.alloc    = 1'b1;
    vjd.tx_no    = tx_no;
    vjd.text_pos = text_pos;
    vjd.length   = length;
  end
  assign dina = vjd;

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr      <= '0;
      rd_valid <= 1'b0;
      jobs     <= '0;
    end else begin
      rd_valid <= !wea;
      if (wea) begin
        ptr  <= ptr + 1'b1;
        jobs <= jobs + 1;
      end
    end
  end

  // A job is only written into a free entry.
  a_free_entry: assert property (@(posedge clk) disable iff (rst)
    wea |-> !douta[31]);
endmodule
