// tb_text_position_controller: self-checking test of the text position
// controller with an exact model of the rest of the scanning pipeline.
//
// The model answers each query three cycles after it is issued with exact
// group membership (no false positives) for random 8-byte pattern prefixes,
// over a text in a 4-letter alphabet with planted patterns. Without false
// positives, the windows handed to the dispatcher must be exactly the
// windows whose blocks 0..4 all lie in groups 0..4 (worked out by brute
// force), each once. A model dispatcher is randomly not ready, so segments
// wait in HOLD. Runs several texts, from shorter than one window to the
// full 8191 bytes, then a text no block of which is in any group, which must
// be scanned at 8 bytes per cycle (one query per cycle, shift 8). For a
// 40-byte text the first four queries must be the first blocks of the four
// segments on consecutive cycles.
module tb_text_position_controller;
  import bfast_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                start = 0, busy, done;
  logic [TEXT_AW-1:0]  length;
  logic [TEXT_AW-1:0]  q_addr;
  logic [N_GROUPS-1:0] hits;
  logic                disp_req, disp_ready;
  logic [TEXT_AW-1:0]  disp_pos;
  logic ev_shift, ev_veri, ev_veri_miss, ev_match, ev_hold, ev_seg_done;
  int checks = 0, failures = 0;
  int n_shift = 0, n_veri = 0, n_miss = 0, n_match = 0, n_hold = 0, n_seg = 0;

  text_position_controller dut (.*);

  localparam int SZ = 1 << TEXT_AW;
  localparam int NP = 40;
  logic [7:0]  txt [SZ];
  logic [7:0]  pat [NP][WIN_SIZE];
  bit          gset [N_GROUPS][logic [31:0]];
  bit          no_groups = 0;
  int          ready_pct = 70;

  function automatic int keep(int g);
    return (g <= int'(WIN_SIZE - BLOCK_BYTES)) ? BLOCK_BYTES : WIN_SIZE - g;
  endfunction
  function automatic logic [31:0] tblock(int a, int g);
    logic [31:0] r;
    for (int k = 0; k < 4; k++) r[8*k +: 8] = txt[(a + k) % SZ];
    for (int k = 0; k < BLOCK_BYTES - keep(g); k++) r[8*k +: 8] = 8'h00;
    return r;
  endfunction
  function automatic logic [31:0] pblock(int p, int g);
    logic [31:0] r = '0;
    for (int k = BLOCK_BYTES - keep(g); k < BLOCK_BYTES; k++)
      r[8*k +: 8] = (g <= int'(WIN_SIZE - BLOCK_BYTES))
                    ? pat[p][WIN_SIZE - BLOCK_BYTES - g + k]
                    : pat[p][k - (BLOCK_BYTES - keep(g))];
    return r;
  endfunction
  function automatic bit member(int g, logic [31:0] b);
    return !no_groups && gset[g].exists(b);
  endfunction

  // Exact query pipeline: hits three cycles after the address.
  logic [TEXT_AW-1:0] a1, a2, a3;
  always @(posedge clk) begin a1 <= q_addr; a2 <= a1; a3 <= a2; end
  always_comb
    for (int g = 0; g < N_GROUPS; g++) hits[g] = member(g, tblock(int'(a3), g));

  // Dispatcher model.
  int got [int];
  always @(negedge clk) disp_ready = ($urandom_range(0, 99) < ready_pct);
  always @(posedge clk) if (!rst && disp_req && disp_ready) begin
    if (got.exists(int'(disp_pos))) begin
      failures++; $display("FAIL duplicate job at %0d", disp_pos);
    end
    got[int'(disp_pos)] = 1;
  end
  always @(posedge clk) if (!rst) begin
    n_shift += int'(ev_shift); n_veri += int'(ev_veri); n_miss += int'(ev_veri_miss);
    n_match += int'(ev_match); n_hold += int'(ev_hold); n_seg += int'(ev_seg_done);
  end

  int first_q [4];
  task automatic run(int len, output int cyc);
    got.delete();
    @(negedge clk);
    length = TEXT_AW'(len); start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin
      if (cyc <= 4) first_q[cyc - 1] = int'(q_addr);
      @(negedge clk); cyc++;
    end
  endtask

  task automatic check_jobs(int len);
    int exp_n = 0;
    for (int w = 0; w + int'(WIN_SIZE) <= len; w++) begin
      bit cand = 1;
      for (int j = 0; j <= int'(WIN_SIZE - BLOCK_BYTES); j++)
        if (!member(j, tblock(w + int'(WIN_SIZE - BLOCK_BYTES) - j, j))) cand = 0;
      if (cand) begin
        exp_n++;
        checks++;
        if (!got.exists(w)) begin failures++; $display("FAIL missed window %0d (len %0d)", w, len); end
      end else if (got.exists(w)) begin
        checks++; failures++; $display("FAIL spurious job %0d", w);
      end
    end
    checks++;
    if (got.size() != exp_n) begin failures++; $display("FAIL %0d jobs, expected %0d", got.size(), exp_n); end
    $display("len %0d: %0d jobs", len, exp_n);
  endtask

  initial begin
    int cyc;
    int lens [6] = '{5, 8, 40, 1000, 4097, 8191};
    for (int p = 0; p < NP; p++)
      for (int k = 0; k < WIN_SIZE; k++) pat[p][k] = "a" + 8'($urandom_range(0, 3));
    for (int p = 0; p < NP; p++)
      for (int g = 0; g < N_GROUPS; g++) gset[g][pblock(p, g)] = 1;
    for (int i = 0; i < SZ; i++) txt[i] = "a" + 8'($urandom_range(0, 3));
    for (int n = 0; n < 60; n++) begin
      int p = $urandom_range(0, NP - 1), a = $urandom_range(0, SZ - WIN_SIZE);
      for (int k = 0; k < WIN_SIZE; k++) txt[a + k] = pat[p][k];
    end
    // plant a pattern across the first segment boundary of a 40-byte text
    for (int k = 0; k < WIN_SIZE; k++) txt[6 + k] = pat[0][k];
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (lens[i]) begin
      run(lens[i], cyc);
      check_jobs(lens[i]);
      // pipeline fill: the four segments issue their first blocks on four
      // consecutive cycles (segments 0-9, 3-19, 13-29, 23-39 of 40 bytes)
      if (lens[i] == 40) begin
        checks++;
        if (first_q != '{4, 7, 17, 27}) begin
          failures++;
          $display("FAIL first blocks %0d %0d %0d %0d", first_q[0], first_q[1], first_q[2], first_q[3]);
        end
      end
    end
    // rate: no block in any group, full-length text
    no_groups = 1;
    run(8191, cyc);
    checks++;
    if (cyc > 8191 / 8 + 16) begin failures++; $display("FAIL slow scan: %0d cycles", cyc); end
    checks++;
    if (got.size() != 0) failures++;
    $display("no-hit scan of 8191 bytes: %0d cycles", cyc);
    $display("events: shift %0d veri %0d miss %0d match %0d hold %0d segdone %0d",
             n_shift, n_veri, n_miss, n_match, n_hold, n_seg);
    checks += 6;
    if (n_shift == 0) failures++;
    if (n_veri == 0) failures++;
    if (n_miss == 0) failures++;
    if (n_match == 0) failures++;
    if (n_hold == 0) failures++;
    if (n_seg == 0) failures++;
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
