// tb_collision_top: end-to-end collision queries on the complete design, all
// parameters at their defaults (24-DOPs, 35-bit coefficients, 9-stage
// pipeline, 64-entry axis table, 128-entry BV stack).
//
// Scene: two BV trees of 5 levels (31 nodes, 16 leaves each) with random
// DOP coefficients that shrink with depth, stored in a behavioural DDR model
// in the node format of cd_pkg, plus one random triangle record per leaf.
// The host part writes 40 random test axes (P'_A, P'_B in [-1, 0], random
// correspondences, random p'), sets n = 24 and starts the query from the
// roots. A stand-in triangle unit checks every triangle word it receives and
// answers with a fixed pseudo-random hit/miss per triangle pair.
// Reference: a recursive traversal of the same trees with an independent
// integer model of the fixed-point overlap test. Without continuation the
// hardware must test exactly the reference's triangle pairs and report
// exactly its hits; with continuation (more axes may be tested per pair) the
// triangle pairs must lie between the reference sets for N and for n axes.
// Several scenes are run. Counted, and required to occur: separations that
// stop a pair early, stale results ignored, axes tested beyond n, pairs
// prefetched while another is tested, child pairs scheduled, triangle tests,
// triangle hits, overlapping DOP pairs. The axis issue rate (one per clock
// while a pair is tested) is checked as well.
module tb_collision_top;
  import cd_pkg::*;
  localparam int K = K_DEF, DW = DW_DEF, PW = PW_DEF, TW = TW_DEF;
  localparam int JW = $clog2(K), XW = $clog2(AXES_MAX_DEF);
  localparam int FB = DW - 2, FC = PW - 2, NCW = (K * DW + 63) / 64;
  localparam int LEVELS = 5, NNODE = (1 << LEVELS) - 1;
  localparam int BASE_A = 0, BASE_B = 1024, TRI_A = 2048, TRI_B = 3072, TRW = TRI_WORDS_DEF;
  localparam int NAX = 40, NSEL = 24;

  typedef logic signed [127:0] big_t;

  logic clk = 0, rst_n = 0;
  logic ax_we = 0;
  logic [XW-1:0] ax_idx = '0;
  logic [2:0][PW-1:0] ax_pa = '0, ax_pb = '0;
  logic [TW-1:0] ax_p = '0;
  logic [2:0][JW-1:0] ax_ja = '0, ax_jb = '0;
  logic [XW:0] cfg_n = '0, cfg_ntotal = '0;
  logic cfg_cont = 0, start = 0;
  logic [24:0] root_a = '0, root_b = '0;
  logic busy, done, collide, stack_overflow, hit_valid;
  logic [24:0] hit_addr_a, hit_addr_b;
  logic mem_req_valid, mem_req_ready, mem_rd_valid;
  logic [24:0] mem_req_addr;
  logic [7:0] mem_req_len;
  logic [63:0] mem_rd_data;
  logic tri_valid, tri_sel, tri_last;
  logic [63:0] tri_data;
  logic [24:0] tri_addr_a, tri_addr_b;
  logic tri_res_valid = 0, tri_res_hit = 0;
  logic [24:0] tri_res_addr_a = '0, tri_res_addr_b = '0;

  int checks = 0, failures = 0;

  collision_top dut (.*);
  ddr_model #(.WORDS(4096), .LATENCY(2), .GAPS(1'b0)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_addr(mem_req_addr), .req_len(mem_req_len),
    .req_ready(mem_req_ready), .rd_valid(mem_rd_valid), .rd_data(mem_rd_data));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endfunction

  // ------------------------------------------------------------ scene
  logic [DW-1:0] coef [2][NNODE + 1][K];     // [tree][heap index]
  logic [2:0][PW-1:0] tpa [NAX], tpb [NAX];
  logic [TW-1:0] tp [NAX];
  logic [2:0][JW-1:0] tja [NAX], tjb [NAX];
  real p_range;

  function automatic int node_addr(int t, int h); return (t ? BASE_B : BASE_A) + (h - 1) * 16; endfunction
  function automatic int tri_addr(int t, int h);  return (t ? TRI_B : TRI_A) + (h - 1) * 8; endfunction
  function automatic bit is_leaf(int h); return h >= (1 << (LEVELS - 1)); endfunction

  task automatic build_scene();
    for (int t = 0; t < 2; t++)
      for (int h = 1; h <= NNODE; h++) begin
        automatic logic [NCW*64-1:0] stream = '0;
        automatic node_hdr_t hd = '0;
        automatic real s = 0.9 ** $clog2(h + 1);
        for (int i = 0; i < K; i++) begin
          automatic real u = ($urandom_range(1050000) / 1000000.0) - 0.05;
          coef[t][h][i] = DW'(longint'($ceil(u * s * (2.0 ** FB))));
          for (int b = 0; b < DW; b++) stream[i * DW + b] = coef[t][h][i][b];
        end
        hd.leaf = is_leaf(h);
        if (hd.leaf) hd.left = 25'(tri_addr(t, h));
        else begin hd.left = 25'(node_addr(t, 2 * h)); hd.right = 25'(node_addr(t, 2 * h + 1)); end
        u_mem.mem[node_addr(t, h)] = 64'(hd);
        for (int w = 0; w < NCW; w++) u_mem.mem[node_addr(t, h) + 1 + w] = stream[w*64 +: 64];
        for (int w = 0; w < TRW; w++) u_mem.mem[tri_addr(t, h) + w] = {$urandom, $urandom};
      end
    for (int x = 0; x < NAX; x++) begin
      for (int i = 0; i < 3; i++) begin
        tpa[x][i] = PW'(-longint'($urandom_range(1000000)) * (longint'(1) <<< FC) / 1000000);
        tpb[x][i] = PW'(-longint'($urandom_range(1000000)) * (longint'(1) <<< FC) / 1000000);
        tja[x][i] = JW'($urandom_range(K - 1));
        tjb[x][i] = JW'($urandom_range(K - 1));
      end
      tp[x] = TW'(longint'((($urandom_range(2000000) / 1000000.0) - 1.0) * p_range * (2.0 ** FB)));
    end
  endtask

  // ------------------------------------------------------------ reference
  function automatic big_t image(logic [2:0][PW-1:0] pv, int t, int h, logic [2:0][JW-1:0] j, int off);
    big_t s = 0;
    for (int i = 0; i < 3; i++) begin
      big_t x = big_t'($signed(coef[t][h][(int'(j[i]) + off) % K]));
      s += (big_t'($signed(pv[i])) + ((x < 0) ? big_t'(1) : big_t'(0))) * x;
    end
    return s;
  endfunction
  function automatic bit axis_sep(int ha, int hb, int x);
    big_t amin = image(tpa[x], 0, ha, tja[x], 0), amax = -image(tpa[x], 0, ha, tja[x], K/2);
    big_t bmin = image(tpb[x], 1, hb, tjb[x], 0), bmax = -image(tpb[x], 1, hb, tjb[x], K/2);
    big_t pt = big_t'($signed(tp[x])) <<< FC;
    return ((amin + pt) - bmax > 0) || (bmin - (amax + pt + (big_t'(1) <<< FC)) > 0);
  endfunction
  function automatic bit pair_sep(int ha, int hb, int nax);
    for (int x = 0; x < nax; x++) if (axis_sep(ha, hb, x)) return 1;
    return 0;
  endfunction
  function automatic bit tri_hits(int a, int b);
    int unsigned v = a * 32'h9E3779B1 ^ b * 32'h85EBCA77;
    v ^= v >> 13;
    return (v % 3) == 0;
  endfunction

  int ref_tri [string];
  int ref_dop_ovl;
  function automatic void ref_traverse(int ha, int hb, int nax);
    if (pair_sep(ha, hb, nax)) return;
    ref_dop_ovl++;
    if (is_leaf(ha) && is_leaf(hb)) ref_tri[$sformatf("%0d/%0d", tri_addr(0, ha), tri_addr(1, hb))] = 1;
    else if (!is_leaf(ha)) begin ref_traverse(2 * ha, hb, nax); ref_traverse(2 * ha + 1, hb, nax); end
    else begin ref_traverse(ha, 2 * hb, nax); ref_traverse(ha, 2 * hb + 1, nax); end
  endfunction

  // ------------------------------------------------------------ triangle unit stand-in
  int tri_seen [string];
  int hits_seen [string];
  int tri_word = 0;
  logic [24:0] pend_a [$], pend_b [$];
  int pend_t [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    tri_res_valid <= 1'b0;
    if (rst_n && tri_valid) begin
      automatic int ad = (tri_word < TRW) ? int'(tri_addr_a) + tri_word : int'(tri_addr_b) + tri_word - TRW;
      check(tri_data === u_mem.mem[ad] && tri_sel == (tri_word >= TRW), "triangle data word");
      check(tri_last == (tri_word == 2 * TRW - 1), "triangle last flag");
      tri_word = tri_last ? 0 : tri_word + 1;
      if (tri_last) begin
        automatic string key = $sformatf("%0d/%0d", tri_addr_a, tri_addr_b);
        tri_seen[key] = tri_seen.exists(key) ? tri_seen[key] + 1 : 1;
        pend_a.push_back(tri_addr_a); pend_b.push_back(tri_addr_b); pend_t.push_back(cyc + 12);
      end
    end
    if (pend_t.size() != 0 && pend_t[0] <= cyc) begin
      automatic logic [24:0] a = pend_a.pop_front(), b = pend_b.pop_front();
      void'(pend_t.pop_front());
      tri_res_valid  <= 1'b1;
      tri_res_hit    <= tri_hits(int'(a), int'(b));
      tri_res_addr_a <= a;
      tri_res_addr_b <= b;
    end
    if (rst_n && hit_valid) begin
      automatic string key = $sformatf("%0d/%0d", hit_addr_a, hit_addr_b);
      hits_seen[key] = 1;
    end
  end

  // ------------------------------------------------------------ mechanism counters
  int n_kill = 0, n_stale = 0, n_cont = 0, n_prefetch = 0, n_children = 0, n_tri = 0, n_ovl = 0;
  int n_hits = 0, n_axes = 0, n_issue_cycles = 0, n_issue_gaps = 0, max_stack = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_axis_control.kill_now) n_kill++;
    if (dut.u_axis_control.res_valid && !dut.u_axis_control.res_live) n_stale++;
    if (dut.u_axis_control.pl_valid && dut.u_axis_control.idx >= cfg_n) n_cont++;
    if (dut.u_axis_control.pl_valid) n_axes++;
    if (dut.u_axis_control.take && dut.u_axis_control.issuing) n_prefetch++;
    if (dut.u_bv_control.push1) n_children++;
    if (dut.u_bv_control.tri_issue) n_tri++;
    if (dut.u_axis_control.ovl_valid) n_ovl++;
    if (hit_valid) n_hits++;
    if (dut.u_axis_control.issuing) begin
      n_issue_cycles++;
      if (!dut.u_axis_control.pl_valid && !dut.u_axis_control.kill_now) n_issue_gaps++;
    end
    if (int'(dut.u_bv_stack.count) > max_stack) max_stack = int'(dut.u_bv_stack.count);
  end

  task automatic run_query(bit cont);
    int t0;
    int ref_n_tri, ref_N_tri;
    int ref_n [string], ref_N [string];
    tri_seen.delete(); hits_seen.delete();
    ref_tri.delete(); ref_dop_ovl = 0;
    ref_traverse(1, 1, NAX);
    ref_N = ref_tri;
    ref_tri.delete(); ref_dop_ovl = 0;
    ref_traverse(1, 1, NSEL);
    ref_n = ref_tri;
    // host: axis table and configuration
    for (int x = 0; x < NAX; x++) begin
      @(negedge clk);
      ax_we = 1; ax_idx = XW'(x);
      ax_pa = tpa[x]; ax_pb = tpb[x]; ax_p = tp[x]; ax_ja = tja[x]; ax_jb = tjb[x];
    end
    @(negedge clk) ax_we = 0;
    cfg_n = (XW+1)'(NSEL); cfg_ntotal = (XW+1)'(NAX); cfg_cont = cont;
    root_a = 25'(node_addr(0, 1)); root_b = 25'(node_addr(1, 1));
    start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    while (!done) @(posedge clk);
    @(negedge clk);
    $display("query (continuation %0d): %0d clocks, triangle tests %0d (reference n: %0d, N: %0d), collide %0d",
             cont, cyc - t0, tri_seen.num(), ref_n.num(), ref_N.num(), collide);
    repeat (30) @(negedge clk);
    check(!busy, "busy after done");
    foreach (tri_seen[k]) check(tri_seen[k] == 1, {"triangle pair tested twice ", k});
    if (!cont) begin
      check(tri_seen.num() == ref_n.num(), "number of triangle pairs");
      foreach (ref_n[k]) check(tri_seen.exists(k), {"missing triangle pair ", k});
    end else begin
      foreach (ref_N[k]) check(tri_seen.exists(k), {"missing triangle pair (N axes) ", k});
      foreach (tri_seen[k]) check(ref_n.exists(k), {"extra triangle pair ", k});
    end
    begin
      automatic bit exp_col = 0;
      foreach (tri_seen[k]) begin
        automatic int a, b;
        void'($sscanf(k, "%d/%d", a, b));
        if (tri_hits(a, b)) begin
          exp_col = 1;
          check(hits_seen.exists(k), {"hit not reported ", k});
        end
      end
      foreach (hits_seen[k]) begin
        automatic int a, b;
        void'($sscanf(k, "%d/%d", a, b));
        check(tri_seen.exists(k) && tri_hits(a, b), {"hit reported for a pair that does not hit ", k});
      end
      check(collide == exp_col, "collide flag");
      $display("  hits reported %0d", hits_seen.num());
    end
    check(!stack_overflow, "stack overflow");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int sc = 0; sc < 4; sc++) begin
      p_range = 0.05 + 0.1 * sc;
      build_scene();
      run_query(0);
      run_query(1);
    end
    check(n_issue_gaps == 0, "axis issue gap while a pair was being tested");
    check(n_kill > 0, "no separation stopped a pair");
    check(n_stale > 0, "no stale result ignored");
    check(n_cont > 0, "no axis tested beyond n");
    check(n_prefetch > 0, "no pair prefetched during a test");
    check(n_children > 0, "no child pairs scheduled");
    check(n_tri > 0 && n_hits > 0, "no triangle test or hit");
    check(n_ovl > 0, "no overlapping DOP pair");
    $display("axes tested %0d, stops %0d, stale results %0d, continued axes %0d, prefetched pairs %0d",
             n_axes, n_kill, n_stale, n_cont, n_prefetch);
    $display("child schedules %0d, overlapping pairs %0d, triangle tests %0d, hits %0d, max stack %0d",
             n_children, n_ovl, n_tri, n_hits, max_stack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
