// tb_bfast_top: end-to-end test of the string matching engine at its full
// default size.
//
// The testbench plays the processor and the verification module:
//  - it builds the eight Bloom filter groups of a pattern set with a random
//    hash matrix in software, and loads the hash matrix, all 16 bit vectors
//    and two 8191-byte texts through the register bus;
//  - text copy 0 is random bytes with planted patterns (the average case),
//    copy 1 is a run of 'a' matching a pattern of twelve 'a' at every
//    position (the worst case, where the job buffer fills and the scan waits);
//  - a model verification module serves the job buffer in order on its port
//    B, compares the text (read through the text memory's verify port, two
//    cycles per byte) with every pattern, reports each match and frees the
//    entry.
// Checks: every pattern occurrence in either text is reported, and nothing
// else; the status registers and virus index memory agree; the average case
// scans faster than 4 bytes per cycle. Each scan mechanism (ordinary shift,
// additional checking, checking ended by a miss, potential match, hold on a
// full buffer, segment end, job buffer wrap, job found false by the
// verifier) must occur at least once.
module tb_bfast_top;
  import bfast_pkg::*;
  import bfast_tb_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0] bus_addr = '0;
  logic        bus_we = 0, bus_re = 0;
  logic [31:0] bus_wdata = '0, bus_rdata;
  logic        bus_rack, scan_busy;
  logic        vm_web = 0;
  logic [VJB_AW-1:0] vm_addrb = '0;
  logic [31:0] vm_dinb = '0, vm_doutb;
  logic        vm_tcopy = 0;
  logic [TEXT_AW-1:0] vm_taddr = '0;
  logic [7:0]  vm_tdata;
  logic        vr_valid = 0, vr_copy = 0;
  logic [15:0] vr_id = '0;
  logic [5:0]  events;
  logic [31:0] jobs_issued;

  bfast_top dut (.*);

  localparam int LEN = 8191;
  localparam int NP  = 60;
  int          plen [NP];
  logic [7:0]  pat  [NP][16];
  logic [7:0]  txt  [2][LEN];
  int checks = 0, failures = 0;
  int ev_cnt [6] = '{default: 0};
  int n_false = 0, n_jobs_seen = 0, n_reports [2] = '{0, 0};
  int found [2][int];              // key pos*NP + id
  bit vm_idle = 1;
  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (!rst)
    for (int e = 0; e < 6; e++) ev_cnt[e] += int'(events[e]);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(logic [15:0] a, logic [31:0] v);
    @(negedge clk); bus_addr = a; bus_wdata = v; bus_we = 1;
    @(negedge clk); bus_we = 0;
  endtask
  task automatic rd(logic [15:0] a, output logic [31:0] v);
    @(negedge clk); bus_addr = a; bus_re = 1;
    @(negedge clk); bus_re = 0; v = bus_rdata;
  endtask

  // ---------------------------------------------------------------- verifier model
  task automatic vm_read(int c, int a, output logic [7:0] b);
    @(negedge clk); vm_tcopy = 1'(c); vm_taddr = TEXT_AW'(a);
    @(negedge clk); b = vm_tdata;          // two cycles per character
  endtask

  initial begin : verifier
    vjd_t j;
    @(negedge clk);
    wait (!rst);
    forever begin
      @(negedge clk);
      @(negedge clk);
      j = vjd_t'(vm_doutb);
      if (!j.alloc) begin vm_idle = 1; continue; end
      vm_idle = 0;
      n_jobs_seen++;
      begin
        automatic bit alive [NP];
        automatic int nalive = NP, nmatch = 0;
        automatic int c = int'(j.tx_no[0]);
        foreach (alive[p]) alive[p] = 1;
        for (int k = 0; k < 16 && nalive > 0; k++) begin
          logic [7:0] b;
          if (int'(j.text_pos) + k >= int'(j.length)) begin
            foreach (alive[p]) if (alive[p] && plen[p] > k) begin alive[p] = 0; nalive--; end
            break;
          end
          vm_read(c, int'(j.text_pos) + k, b);
          foreach (alive[p]) if (alive[p]) begin
            if (pat[p][k] != b) begin alive[p] = 0; nalive--; end
            else if (k == plen[p] - 1) begin
              alive[p] = 0; nalive--; nmatch++;
              found[c][int'(j.text_pos) * NP + p] = 1;
              @(negedge clk); vr_valid = 1; vr_copy = 1'(c); vr_id = 16'(p);
              @(negedge clk); vr_valid = 0;
              n_reports[c]++;
            end
          end
        end
        if (nmatch == 0) n_false++;
      end
      @(negedge clk); vm_web = 1; vm_dinb = '0;
      @(negedge clk); vm_web = 0; vm_addrb = vm_addrb + 1'b1;
    end
  end

  // ---------------------------------------------------------------- main
  initial begin
    hmat_t m;
    bv_shadow sh;
    logic [31:0] v;
    int exp_n [2] = '{0, 0};
    int t0, t1, tstart, tend [2];
    int key;

    // pattern set: pattern 0 is twelve 'a', the rest random, 8..16 bytes
    for (int p = 0; p < NP; p++) begin
      plen[p] = (p == 0) ? 12 : $urandom_range(8, 16);
      for (int k = 0; k < 16; k++) pat[p][k] = (p == 0) ? "a" : 8'($urandom);
    end
    // text 0: random with planted patterns; text 1: all 'a' but a few bytes
    for (int i = 0; i < LEN; i++) txt[0][i] = 8'($urandom);
    for (int n = 0; n < 80; n++) begin
      automatic int p = $urandom_range(1, NP - 1), a = $urandom_range(0, LEN - plen[p]);
      for (int k = 0; k < plen[p]; k++) txt[0][a + k] = pat[p][k];
    end
    // fragments: the last block of a prefix alone, so checking stops early
    for (int n = 0; n < 150; n++) begin
      automatic int p = $urandom_range(1, NP - 1), a = $urandom_range(0, LEN - 8);
      for (int k = 4; k < 8; k++) txt[0][a + k] = pat[p][k];
    end
    for (int i = 0; i < LEN; i++) txt[1][i] = (i % 1500 == 700) ? "b" : "a";
    // reference occurrences
    for (int c = 0; c < 2; c++)
      for (int a = 0; a < LEN; a++)
        for (int p = 0; p < NP; p++) if (a + plen[p] <= LEN) begin
          automatic bit ok = 1;
          for (int k = 0; k < plen[p]; k++) if (txt[c][a + k] != pat[p][k]) ok = 0;
          if (ok) exp_n[c]++;
        end

    // groups from the 8-byte prefixes
    m = random_matrix();
    sh = new(m);
    for (int p = 0; p < NP; p++)
      for (int g = 0; g < N_GROUPS; g++) begin
        logic [31:0] b = '0;
        for (int k = BLOCK_BYTES - keep_bytes(g); k < BLOCK_BYTES; k++)
          b[8*k +: 8] = (g <= int'(WIN_SIZE - BLOCK_BYTES))
                        ? pat[p][WIN_SIZE - BLOCK_BYTES - g + k]
                        : pat[p][k - (BLOCK_BYTES - keep_bytes(g))];
        sh.insert(g, b);
      end

    repeat (3) @(negedge clk);
    rst = 0;
    for (int w = 0; w < 64; w++)
      wr(16'h5010 + 16'(4 * w), {2'b0, m[w / 16][2 * (w % 16) + 1], 2'b0, m[w / 16][2 * (w % 16)]});
    for (int g = 0; g < N_GROUPS; g++)
      for (int bv = 0; bv < N_BV; bv++)
        for (int i = 0; i < 512; i++)
          wr(16'h5110 + 16'(((g * N_BV + bv) * 512 + i) * 4), sh.w[g][bv][i]);
    for (int c = 0; c < 2; c++)
      for (int w = 0; w < (LEN + 3) / 4; w++) begin
        logic [31:0] x = '0;
        for (int k = 0; k < 4; k++) if (4 * w + k < LEN) x[8*k +: 8] = txt[c][4 * w + k];
        wr(16'h1010 + 16'(c * 16'h2000) + 16'(4 * w), x);
      end

    // start both copies
    tstart = cyc;
    wr(16'h0000, 32'h8000_0000 | LEN);
    wr(16'h0004, 32'h8000_0000 | LEN);
    @(negedge clk);
    t0 = cyc;
    wait (!scan_busy);
    tend[0] = cyc;
    @(negedge clk); wait (scan_busy);
    t1 = cyc;
    wait (!scan_busy);
    tend[1] = cyc;
    // let the verifier drain the buffer
    repeat (50) @(negedge clk);
    while (!vm_idle) repeat (50) @(negedge clk);
    repeat (50) @(negedge clk);

    $display("copy 0: %0d cycles, %0.2f bytes/cycle, %0d occurrences",
             tend[0] - t0, real'(LEN) / real'(tend[0] - t0), exp_n[0]);
    $display("copy 1: %0d cycles, %0.2f bytes/cycle, %0d occurrences",
             tend[1] - t1, real'(LEN) / real'(tend[1] - t1), exp_n[1]);
    for (int c = 0; c < 2; c++) begin
      chk(found[c].size() == exp_n[c], $sformatf("copy %0d: %0d reported, %0d expected", c, found[c].size(), exp_n[c]));
      rd(16'h0008 + 16'(4 * c), v);
      chk(v[31] == 1'b1, "finish bit");
      chk(int'(v[10:0]) == ((exp_n[c] < 1024) ? exp_n[c] : 1024), $sformatf("virus count %0d", v[10:0]));
    end
    // every reported occurrence is a real one (found keys came from exact
    // comparison); check the planted ones by position
    for (int a = 0; a < LEN; a++)
      for (int p = 0; p < NP; p++) if (a + plen[p] <= LEN) begin
        automatic bit ok = 1;
        for (int k = 0; k < plen[p]; k++) if (txt[0][a + k] != pat[p][k]) ok = 0;
        if (ok) chk(found[0].exists(a * NP + p), $sformatf("occurrence %0d at %0d", p, a));
      end
    // virus index memory of copy 0 holds the reported identifiers
    rd(16'h0010, v);
    begin
      automatic bit seen = 0;
      foreach (found[0][k]) if ((k % NP) == int'(v[15:0])) seen = 1;
      chk(seen, "first virus index entry is a reported identifier");
    end
    rd(16'h0810, v);
    chk(v == 32'h0, "copy 1 virus index holds pattern 0");
    chk(real'(LEN) / real'(tend[0] - t0) > 4.0, "average-case scan rate");

    $display("events: shift %0d checking %0d miss %0d potential %0d hold %0d segment-end %0d",
             ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3], ev_cnt[4], ev_cnt[5]);
    $display("jobs %0d, false jobs %0d", jobs_issued, n_false);
    for (int e = 0; e < 6; e++) chk(ev_cnt[e] > 0, $sformatf("event %0d happened", e));
    chk(jobs_issued > 32'(1 << VJB_AW), "job buffer wrapped");
    chk(n_false > 0, "a job found false by verification");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
