// host_interface: processor-visible registers and memories of the engine.
//
// A plain 32-bit register bus (byte addresses, word accesses; write in one
// cycle, read data one cycle after bus_re with bus_rack) decoded into the
// address map of the design:
//
//   0x0000 / 0x0004  command of text copy 0 / 1: [31] enable, [12:0] length
//   0x0008 / 0x000C  status of copy 0 / 1 (read only): [31] scan finished,
//                    [10:0] virus count
//   0x0010 / 0x0810  virus index memory of copy 0 / 1 (2 kB each, read only):
//                    1024 16-bit virus identifiers, two per word, low first
//   0x1010 / 0x3010  text memory of copy 0 / 1 (8 kB each, write only)
//   0x5010           hash matrix, 64 words: word w holds d[w/16][2*(w%16)]
//                    in bits [13:0] and d[w/16][2*(w%16)+1] in [29:16]
//   0x5110           M-bit vectors, 16 x 512 words (write only): word o goes
//                    to group o/1024, bit vector (o/512)%2, word o%512
//
// Two copies of the command/status/index/text set let the host load one
// text while the other is scanned. Writing a command with enable set clears
// that copy's status. When the scanner is idle, an enabled copy that has
// not finished is started (the copy not scanned last goes first); when the
// scan ends, the copy's finish bit is set and its enable cleared. The
// verification module reports each confirmed virus on vr_*; the identifier
// is appended to the copy's virus index memory and the count incremented
// (it stops at 1024).
//
// The base addresses, region sizes and the command/status fields follow the
// design. Bus protocol, the packing of the hash matrix and bit vectors, the
// 16-bit virus identifiers and the start policy are this design's choices.
module host_interface
  import bfast_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  // register bus
  input  logic [15:0]          bus_addr,
  input  logic                 bus_we,
  input  logic                 bus_re,
  input  logic [31:0]          bus_wdata,
  output logic [31:0]          bus_rdata,
  output logic                 bus_rack,
  // hash matrix and bit vector writes
  output logic [N_HASH-1:0][8*BLOCK_BYTES-1:0][HASH_W-1:0] d,
  output logic                 bv_we,
  output logic [$clog2(N_GROUPS)-1:0] bv_group,
  output logic [$clog2(N_BV)-1:0]     bv_sel,
  output logic [HASH_W-6:0]    bv_addr,
  output logic [31:0]          bv_wdata,
  // text memory writes
  output logic                 txt_we,
  output logic                 txt_copy,
  output logic [TEXT_AW-3:0]   txt_waddr,
  output logic [31:0]          txt_wdata,
  // scan control
  output logic                 scan_start,
  output logic [TEXT_AW-1:0]   scan_len,
  output logic                 scan_copy,
  input  logic                 scan_busy,
  input  logic                 scan_done,
  // verification results
  input  logic                 vr_valid,
  input  logic                 vr_copy,
  input  logic [15:0]          vr_id
);
  localparam logic [15:0] A_CMD   = 16'h0000;
  localparam logic [15:0] A_STAT  = 16'h0008;
  localparam logic [15:0] A_VIDX  = 16'h0010;
  localparam logic [15:0] A_TEXT  = 16'h1010;
  localparam logic [15:0] A_HASH  = 16'h5010;
  localparam logic [15:0] A_MBV   = 16'h5110;
  localparam int unsigned VIDX_N  = 1024;
  localparam int unsigned BV_REGION = N_GROUPS * N_BV * (1 << (HASH_W - 5)) * 4;

  logic                cmd_en  [N_COPIES];
  logic [TEXT_AW-1:0]  cmd_len [N_COPIES];
  logic                st_fin  [N_COPIES];
  logic [10:0]         vcount  [N_COPIES];
  logic [15:0]         vidx    [N_COPIES][VIDX_N];

  logic        active;      // a scan is running
  logic        cur;         // copy being (or last) scanned
  logic [15:0] off;

  // ---------------------------------------------------------------- writes
  always_comb begin
    bv_we     = 1'b0;
    txt_we    = 1'b0;
    off       = '0;
    if (bus_we && bus_addr >= A_TEXT && bus_addr < A_HASH) begin
      txt_we = 1'b1;
      off    = bus_addr - A_TEXT;
    end
    if (bus_we && bus_addr >= A_MBV && 32'(bus_addr) < 32'(A_MBV) + BV_REGION) begin
      bv_we = 1'b1;
      off   = bus_addr - A_MBV;
    end
  end
  assign txt_copy  = off[TEXT_AW];
  assign txt_waddr = off[TEXT_AW-1:2];
  assign txt_wdata = bus_wdata;
  assign bv_addr   = off[HASH_W-4:2];
  assign bv_sel    = off[HASH_W-3 +: $clog2(N_BV)];
  assign bv_group  = off[HASH_W-3+$clog2(N_BV) +: $clog2(N_GROUPS)];
  assign bv_wdata  = bus_wdata;

  // ---------------------------------------------------------------- scan start
  logic pick_ok;
  logic pick;
  always_comb begin
    pick_ok = 1'b0;
    pick    = 1'b0;
    if (!active && !scan_busy) begin
      if (cmd_en[!cur] && !st_fin[!cur]) begin
        pick_ok = 1'b1;
        pick    = !cur;
      end else if (cmd_en[cur] && !st_fin[cur]) begin
        pick_ok = 1'b1;
        pick    = cur;
      end
    end
  end
  assign scan_start = pick_ok;
  assign scan_copy  = active ? cur : pick;
  assign scan_len   = cmd_len[scan_copy];

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      cur    <= 1'b1;
      for (int c = 0; c < N_COPIES; c++) begin
        cmd_en[c]  <= 1'b0;
        cmd_len[c] <= '0;
        st_fin[c]  <= 1'b0;
        vcount[c]  <= '0;
      end
      d <= '0;
    end else begin
      if (pick_ok) begin
        active <= 1'b1;
        cur    <= pick;
      end
      if (scan_done && active) begin
        active       <= 1'b0;
        st_fin[cur]  <= 1'b1;
        cmd_en[cur]  <= 1'b0;
      end
      if (bus_we && (bus_addr == A_CMD || bus_addr == A_CMD + 16'd4)) begin
        cmd_en[bus_addr[2]]  <= bus_wdata[31];
        cmd_len[bus_addr[2]] <= bus_wdata[TEXT_AW-1:0];
        if (bus_wdata[31]) begin
          st_fin[bus_addr[2]] <= 1'b0;
          vcount[bus_addr[2]] <= '0;
        end
      end
      if (bus_we && bus_addr >= A_HASH && bus_addr < A_MBV) begin
        logic [5:0] w;
        w = 6'((bus_addr - A_HASH) >> 2);
        d[w[5:4]][{w[3:0], 1'b0}] <= bus_wdata[HASH_W-1:0];
        d[w[5:4]][{w[3:0], 1'b1}] <= bus_wdata[16 +: HASH_W];
      end
      if (vr_valid && vcount[vr_copy] < 11'(VIDX_N))
        vcount[vr_copy] <= vcount[vr_copy] + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (vr_valid && vcount[vr_copy] < 11'(VIDX_N))
      vidx[vr_copy][vcount[vr_copy][9:0]] <= vr_id;

  // ---------------------------------------------------------------- reads
  always_ff @(posedge clk) begin
    if (rst) begin
      bus_rack  <= 1'b0;
      bus_rdata <= '0;
    end else begin
      bus_rack  <= bus_re;
      bus_rdata <= '0;
      if (bus_re) begin
        if (bus_addr == A_CMD || bus_addr == A_CMD + 16'd4)
          bus_rdata <= {cmd_en[bus_addr[2]], 18'd0, cmd_len[bus_addr[2]]};
        else if (bus_addr == A_STAT || bus_addr == A_STAT + 16'd4)
          bus_rdata <= {st_fin[bus_addr[2]], 20'd0, vcount[bus_addr[2]]};
        else if (bus_addr >= A_VIDX && bus_addr < A_TEXT) begin
          logic [11:2] o;
          o = 10'((bus_addr - A_VIDX) >> 2);
          bus_rdata <= {vidx[o[11]][{o[10:2], 1'b1}], vidx[o[11]][{o[10:2], 1'b0}]};
        end else if (bus_addr >= A_HASH && bus_addr < A_MBV) begin
          logic [5:0] w;
          w = 6'((bus_addr - A_HASH) >> 2);
          bus_rdata <= {2'b0, d[w[5:4]][{w[3:0], 1'b1}], 2'b0, d[w[5:4]][{w[3:0], 1'b0}]};
        end
      end
    end
  end
endmodule
