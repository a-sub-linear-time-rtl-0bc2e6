// text_position_controller: the TextPositionController of the scanning module.
//
// The text of `length` bytes is cut into N_SEG (4) segments that are scanned
// independently and interleaved, one query per cycle. Segment k covers bytes
// max(0, b_k - WIN_SIZE + 1) .. b_(k+1) - 1 with b_k = floor(k*length/4); the
// overlap of WIN_SIZE-1 bytes lets every window lie wholly inside exactly one
// segment. Each segment has its own text position TP (byte address of the
// suffix block of the search window) and its own state machine:
//
//   INIT  idle / finished. On start: TP = segment start + WIN_SIZE - BLOCK_BYTES.
//   SCAN  block at TP queried; shift = smallest i with group i hit, or
//         WIN_SIZE if none. shift != 0: TP += shift (INIT once the block
//         would pass the segment end). shift == 0: STP = TP, TP -= 1, VERI.
//   VERI  additional checking: the block j bytes before STP is tested against
//         group j. Hit: j++ and TP -= 1, until j = WIN_SIZE - BLOCK_BYTES
//         also hits, which is a potential match: TP = STP + 1, VEND with a
//         job pending. Miss: TP = STP + (smallest i > j with group i hit, or
//         WIN_SIZE) - j, VEND.
//   VEND  checking finished. A pending job is handed to the job dispatcher,
//         or the segment goes to HOLD when the VJB is full; then the block at
//         TP is treated as in SCAN (SCAN, VERI or INIT).
//   HOLD  TP kept, the block re-queried, until the dispatcher is ready.
//
// Pipeline: cycle t issues TP of segment (t mod 4) to the text fetch (q_addr);
// the block is fetched (t), hashed (t+1), looked up in the bit vectors (t+2)
// and the group hits arrive in t+3, when this module updates that segment, in
// time for its next issue in t+4. With one segment this is the multi-cycle
// scanner; with four the scanner does one shift per cycle.
//
// disp_req/disp_pos ask the job dispatcher to record the window starting at
// disp_pos (= STP - (WIN_SIZE - BLOCK_BYTES)); disp_ready accepts it in the
// same cycle. done pulses for one cycle when every segment is back in INIT.
// The ev_* outputs pulse on the named events (for counting).
//
// The five states, their position updates and the four-segment pipeline
// follow the design. The exact segment arithmetic for lengths not divisible
// by four, the shift computed from the smallest hit group above j after a
// miss in VERI, and the window start as the job position are this design's
// choices.
module text_position_controller
  import bfast_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [TEXT_AW-1:0]   length,
  output logic                 busy,
  output logic                 done,
  // query issue and result
  output logic [TEXT_AW-1:0]   q_addr,
  input  logic [N_GROUPS-1:0]  hits,
  // job dispatch
  output logic                 disp_req,
  output logic [TEXT_AW-1:0]   disp_pos,
  input  logic                 disp_ready,
  // events
  output logic                 ev_shift,
  output logic                 ev_veri,
  output logic                 ev_veri_miss,
  output logic                 ev_match,
  output logic                 ev_hold,
  output logic                 ev_seg_done
);
  localparam int unsigned DEPTH  = 4;          // issue .. result, cycles
  localparam int unsigned SEG_W  = $clog2(N_SEG);
  localparam int unsigned J_MAX  = WIN_SIZE - BLOCK_BYTES;
  localparam int unsigned PW     = TEXT_AW + 2; // signed position width

  typedef logic signed [PW-1:0] pos_t;

  tpc_state_t         st   [N_SEG];
  pos_t               tp   [N_SEG];
  pos_t               stp  [N_SEG];
  pos_t               send [N_SEG];
  logic [SHIFT_W-1:0] jj   [N_SEG];
  logic               mp   [N_SEG];

  // ---------------------------------------------------------------- issue
  logic [SEG_W-1:0] slot;
  logic [DEPTH-2:0] pv;                 // valid of queries in flight
  logic [SEG_W-1:0] pseg [DEPTH-1];
  logic             issue_v;

  assign issue_v = (st[slot] != ST_INIT);
  assign q_addr  = tp[slot][TEXT_AW-1:0];

  // ---------------------------------------------------------------- result
  logic [SEG_W-1:0] r;                  // segment whose hits arrive
  logic             rv;
  assign r  = pseg[DEPTH-2];
  assign rv = pv[DEPTH-2];

  // Priority encoder: distance from j to the first hit group at or above j.
  function automatic logic [SHIFT_W-1:0] prio(input logic [N_GROUPS-1:0] h,
                                              input logic [SHIFT_W-1:0] j);
    prio = SHIFT_W'(WIN_SIZE) - j;
    for (int i = N_GROUPS - 1; i >= 0; i--)
      if (i >= int'(j) && h[i]) prio = SHIFT_W'(i) - j;
  endfunction

  // Next-state values of segment r.
  tpc_state_t         n_st;
  pos_t               n_tp, n_stp;
  logic [SHIFT_W-1:0] n_j, sh0;
  logic               n_mp, go;

  always_comb begin
    go    = 1'b1;
    n_st  = st[r];
    n_tp  = tp[r];
    n_stp = stp[r];
    n_j   = jj[r];
    n_mp  = mp[r];
    disp_req     = 1'b0;
    ev_shift     = 1'b0;
    ev_veri      = 1'b0;
    ev_veri_miss = 1'b0;
    ev_match     = 1'b0;
    ev_hold      = 1'b0;
    ev_seg_done  = 1'b0;
    sh0 = prio(hits, '0);
    if (rv) begin
      unique case (st[r])
        ST_SCAN, ST_VEND, ST_HOLD: begin
          if (mp[r]) begin
            disp_req = 1'b1;
            if (disp_ready) n_mp = 1'b0;
            else begin
              go = 1'b0;
              n_st = ST_HOLD;
              ev_hold = (st[r] != ST_HOLD);
            end
          end
          if (go) begin
            if (tp[r] + pos_t'(BLOCK_BYTES - 1) > send[r]) begin
              n_st = ST_INIT;
              ev_seg_done = 1'b1;
            end else if (sh0 == '0) begin
              n_stp   = tp[r];
              n_tp    = tp[r] - pos_t'(1);
              n_j     = SHIFT_W'(1);
              n_st    = ST_VERI;
              ev_veri = 1'b1;
            end else begin
              n_tp     = tp[r] + pos_t'(sh0);
              ev_shift = 1'b1;
              if (n_tp + pos_t'(BLOCK_BYTES - 1) > send[r]) begin
                n_st = ST_INIT;
                ev_seg_done = 1'b1;
              end else n_st = ST_SCAN;
            end
          end
        end
        ST_VERI: begin
          if (hits[jj[r][$clog2(N_GROUPS)-1:0]]) begin
            if (jj[r] == SHIFT_W'(J_MAX)) begin
              n_tp     = stp[r] + pos_t'(1);
              n_mp     = 1'b1;
              n_st     = ST_VEND;
              ev_match = 1'b1;
            end else begin
              n_j  = jj[r] + 1'b1;
              n_tp = tp[r] - pos_t'(1);
            end
          end else begin
            n_tp = stp[r] + pos_t'(prio(hits, jj[r]));
            n_st = ST_VEND;
            ev_veri_miss = 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  assign disp_pos = TEXT_AW'(stp[r] - pos_t'(J_MAX));

  // ---------------------------------------------------------------- segments
  // Segment bounds for a new text.
  pos_t bnd [N_SEG + 1];
  always_comb
    for (int k = 0; k <= N_SEG; k++)
      bnd[k] = pos_t'((k * int'(length)) / N_SEG);

  logic any_active;
  always_comb begin
    any_active = 1'b0;
    for (int s = 0; s < N_SEG; s++)
      if (st[s] != ST_INIT) any_active = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      slot <= '0;
      pv   <= '0;
      for (int s = 0; s < N_SEG; s++) begin
        st[s] <= ST_INIT;
        mp[s] <= 1'b0;
        tp[s] <= '0;
        stp[s] <= '0;
        send[s] <= '0;
        jj[s] <= '0;
      end
      for (int d = 0; d < DEPTH - 1; d++) pseg[d] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        slot <= '0;
        pv   <= '0;
        for (int s = 0; s < N_SEG; s++) begin
          pos_t s0;
          s0 = (s == 0) ? pos_t'(0) : bnd[s] - pos_t'(WIN_SIZE - 1);
          if (s0 < 0) s0 = '0;
          send[s] <= bnd[s+1] - pos_t'(1);
          tp[s]   <= s0 + pos_t'(J_MAX);
          mp[s]   <= 1'b0;
          jj[s]   <= '0;
          st[s]   <= (s0 + pos_t'(WIN_SIZE - 1) > bnd[s+1] - pos_t'(1))
                     ? ST_INIT : ST_SCAN;
        end
      end else if (busy) begin
        slot    <= slot + 1'b1;
        pv      <= {pv[DEPTH-3:0], issue_v};
        pseg[0] <= slot;
        for (int d = 1; d < DEPTH - 1; d++) pseg[d] <= pseg[d-1];
        if (rv) begin
          st[r]  <= n_st;
          tp[r]  <= n_tp;
          stp[r] <= n_stp;
          jj[r]  <= n_j;
          mp[r]  <= n_mp;
        end
        if (!any_active) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // A job is requested only for a checked window inside the text.
  a_disp_in_text: assert property (@(posedge clk) disable iff (rst)
    disp_req |-> (stp[r] >= pos_t'(J_MAX)));
endmodule
