// bfast_top: Bloom-filter accelerated sub-linear string matching engine.
//
// The engine finds the places in a text where a pattern of a large set may
// start, reading far fewer than all text bytes. A search window of WIN_SIZE
// (8) bytes slides along the text; only its last 4-byte block is read. The
// block is looked up in 8 Bloom filters at once, group i holding every block
// that occurs i bytes before the end of a pattern's 8-byte prefix; the
// lowest hit group gives how far the window may safely move (8 if none).
// When group 0 hits, the blocks before it are checked against groups 1..4
// and only a window that passes all of them becomes a verification job,
// which is written into the verification job buffer (VJB) for an external
// verification module while the scan goes on.
//
// Structure (as in the block diagram of the design):
//   host_interface            register bus, command/status, hash matrix,
//                             bit vector and text loading, virus index
//   scanning module           text_mem_fetch (two 4-bank text memories),
//                             bloom_filter_query (8 groups), and
//                             text_position_controller (4 interleaved
//                             segments, one query per cycle)
//   verification interface    job_dispatcher and vjb_ram
// The verification module itself is outside: it reads jobs on VJB port B,
// reads the text on the text memory's verify port, clears each job entry
// when done, and reports confirmed viruses on vr_*.
//
// Clocking: one clock, synchronous active-high reset. A scan of L bytes
// takes about L / (average shift) cycles plus the time spent waiting for a
// free VJB entry.
module bfast_top
  import bfast_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  // processor register bus
  input  logic [15:0]         bus_addr,
  input  logic                bus_we,
  input  logic                bus_re,
  input  logic [31:0]         bus_wdata,
  output logic [31:0]         bus_rdata,
  output logic                bus_rack,
  output logic                scan_busy,
  // verification module: VJB port B
  input  logic                vm_web,
  input  logic [VJB_AW-1:0]   vm_addrb,
  input  logic [31:0]         vm_dinb,
  output logic [31:0]         vm_doutb,
  // verification module: text read port
  input  logic                vm_tcopy,
  input  logic [TEXT_AW-1:0]  vm_taddr,
  output logic [7:0]          vm_tdata,
  // verification module: results
  input  logic                vr_valid,
  input  logic                vr_copy,
  input  logic [15:0]         vr_id,
  // scan events, one pulse each: {segment done, hold entered, potential
  // match, checking ended by a miss, checking started, ordinary shift}
  output logic [5:0]          events,
  output logic [31:0]         jobs_issued
);
  logic [N_HASH-1:0][8*BLOCK_BYTES-1:0][HASH_W-1:0] d;
  logic                          bv_we;
  logic [$clog2(N_GROUPS)-1:0]   bv_group;
  logic [$clog2(N_BV)-1:0]       bv_sel;
  logic [HASH_W-6:0]             bv_addr;
  logic [31:0]                   bv_wdata;
  logic                          txt_we, txt_copy;
  logic [TEXT_AW-3:0]            txt_waddr;
  logic [31:0]                   txt_wdata;
  logic                          scan_start, scan_copy, scan_done;
  logic [TEXT_AW-1:0]            scan_len;

  host_interface u_host (
    .clk, .rst,
    .bus_addr, .bus_we, .bus_re, .bus_wdata, .bus_rdata, .bus_rack,
    .d, .bv_we, .bv_group, .bv_sel, .bv_addr, .bv_wdata,
    .txt_we, .txt_copy, .txt_waddr, .txt_wdata,
    .scan_start, .scan_len, .scan_copy, .scan_busy, .scan_done,
    .vr_valid, .vr_copy, .vr_id);

  // ---------------------------------------------------------------- scanning
  logic [TEXT_AW-1:0]          q_addr;
  logic [8*BLOCK_BYTES-1:0]    block;
  logic [N_GROUPS-1:0]         hits;
  logic                        disp_req, disp_ready;
  logic [TEXT_AW-1:0]          disp_pos;
  logic ev_shift, ev_veri, ev_veri_miss, ev_match, ev_hold, ev_seg_done;

  text_mem_fetch u_fetch (
    .clk,
    .h_we(txt_we), .h_copy(txt_copy), .h_waddr(txt_waddr), .h_be(4'hF),
    .h_wdata(txt_wdata),
    .s_copy(scan_copy), .s_addr(q_addr), .s_block(block),
    .v_copy(vm_tcopy), .v_addr(vm_taddr), .v_data(vm_tdata));

  bloom_filter_query u_bfq (
    .clk, .block, .d,
    .wr_en(bv_we), .wr_group(bv_group), .wr_bv(bv_sel), .wr_addr(bv_addr),
    .wr_data(bv_wdata), .hits);

  text_position_controller u_tpc (
    .clk, .rst,
    .start(scan_start), .length(scan_len), .busy(scan_busy), .done(scan_done),
    .q_addr, .hits,
    .disp_req, .disp_pos, .disp_ready,
    .ev_shift, .ev_veri, .ev_veri_miss, .ev_match, .ev_hold, .ev_seg_done);

  // ---------------------------------------------------------------- verification interface
  logic              wea;
  logic [VJB_AW-1:0] addra;
  logic [31:0]       dina, douta;

  assign events = {ev_seg_done, ev_hold, ev_match, ev_veri_miss, ev_veri, ev_shift};

  job_dispatcher u_disp (
    .clk, .rst,
    .req(disp_req), .tx_no({1'b0, scan_copy}), .text_pos(disp_pos),
    .length(scan_len), .ready(disp_ready),
    .wea, .addra, .dina, .douta, .jobs(jobs_issued));

  vjb_ram #(.AW(VJB_AW)) u_vjb (
    .clk,
    .wea, .addra, .dina, .douta,
    .web(vm_web), .addrb(vm_addrb), .dinb(vm_dinb), .doutb(vm_doutb));
endmodule
