// tb_axis_control: Axis-control against a stand-in pipeline.
//
// The axis table entry i carries i in P'_A[0], so the stand-in pipeline (a
// LATENCY-clock delay line) knows which axis of which pair (tag addr_a) it
// is testing; each pair has a random set of separating axes. A stand-in
// GetData offers the pairs in order after random load times. Checked, pair by
// pair: axes are issued 0,1,2,... one per clock; no axis of a pair enters
// after its first separating result came back; a pair not stopped ends on the
// axis the rule "i = N-1, or i >= n-1 and (no continuation or next pair
// ready)" selects, and carries the last flag there only; overlap is reported
// exactly for the pairs none of whose issued axes separates, with their tag.
// Runs once without and once with continuation, and counts stops, ignored
// stale results and continued axes.
module tb_axis_control;
  import cd_pkg::*;
  localparam int K = K_DEF, PW = PW_DEF, TW = TW_DEF, AXES_MAX = AXES_MAX_DEF;
  localparam int JW = $clog2(K), XW = $clog2(AXES_MAX);
  localparam int LAT = 7 + MUL_EXTRA_DEF;
  localparam int NPAIR = 300;

  logic clk = 0, rst_n = 0;
  logic ax_we = 0;
  logic [XW-1:0] ax_idx = '0;
  logic [2:0][PW-1:0] ax_pa = '0, ax_pb = '0;
  logic [TW-1:0] ax_p = '0;
  logic [2:0][JW-1:0] ax_ja = '0, ax_jb = '0;
  logic [XW:0] cfg_n, cfg_ntotal;
  logic cfg_cont;
  logic new_valid = 0, take;
  logic [24:0] new_addr_a = '0, new_addr_b = '0;
  node_hdr_t new_hdr_a = '0, new_hdr_b = '0;
  logic pl_valid;
  logic [2:0][PW-1:0] pl_pa, pl_pb;
  logic [TW-1:0] pl_p;
  logic [2:0][JW-1:0] pl_ja, pl_jb;
  pipe_tag_t pl_tag, res_tag, ovl_tag;
  logic res_valid, res_sep, ovl_valid, issuing;

  int checks = 0, failures = 0;
  int n_kill = 0, n_stale = 0, n_cont = 0, n_ovl = 0;

  axis_control dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endfunction

  // ------------------------------------------------------ pair scenario
  bit sepax [NPAIR][AXES_MAX];      // which axes separate pair p
  int  next_axis [NPAIR];           // next axis index expected
  bit  killed [NPAIR];              // first separating result has come back
  bit  any_sep_issued [NPAIR];
  bit  ended [NPAIR];
  int  ovl_seen [NPAIR];

  // stand-in pipeline
  logic [LAT-1:0] dv;
  logic [LAT-1:0] ds;
  pipe_tag_t dt [LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin dv <= '0; ds <= '0; end
    else begin
      dv <= {dv[LAT-2:0], pl_valid};
      ds <= {ds[LAT-2:0], sepax[pl_tag.addr_a % NPAIR][pl_pa[0] % AXES_MAX]};
    end
  end
  always_ff @(posedge clk) begin
    dt[0] <= pl_tag;
    for (int i = 1; i < LAT; i++) dt[i] <= dt[i-1];
  end
  assign res_valid = dv[LAT-1];
  assign res_sep   = ds[LAT-1];
  assign res_tag   = dt[LAT-1];

  // ------------------------------------------------------ monitor
  always @(posedge clk) if (rst_n) begin
    if (res_valid) begin
      automatic int p = int'(res_tag.addr_a);
      if (killed[p]) n_stale++;
      if (res_sep && !killed[p]) begin killed[p] = 1; if (issuing && !ended[p]) n_kill++; end
    end
    if (pl_valid) begin
      automatic int p = int'(pl_tag.addr_a);
      automatic int i = int'(pl_pa[0]);
      bit exp_last;
      check(!ended[p], "axis issued for a finished pair");
      check(i == next_axis[p], $sformatf("pair %0d axis %0d, expected %0d", p, i, next_axis[p]));
      check(!killed[p], "axis issued after the pair was found separated");
      exp_last = (i == int'(cfg_ntotal) - 1) || (i >= int'(cfg_n) - 1 && (!cfg_cont || new_valid));
      check(pl_tag.last == exp_last, $sformatf("last flag of pair %0d axis %0d", p, i));
      if (i >= int'(cfg_n)) n_cont++;
      if (sepax[p][i]) any_sep_issued[p] = 1;
      next_axis[p] = i + 1;
      if (pl_tag.last) ended[p] = 1;
    end else if (issuing) begin
      // issuing but nothing sent: only allowed in the clock a kill arrives
      check(res_valid && res_sep, "issue gap without a separating result");
    end
    if (ovl_valid) begin
      automatic int p = int'(ovl_tag.addr_a);
      n_ovl++;
      ovl_seen[p]++;
      check(!any_sep_issued[p], $sformatf("overlap reported for separated pair %0d", p));
      check(ovl_tag.addr_b == 25'(p + 1000) && ovl_tag.hdr_a == node_hdr_t'(p), "overlap tag");
    end
  end

  task automatic run(bit cont);
    cfg_cont = cont;
    foreach (next_axis[p]) begin
      next_axis[p] = 0; killed[p] = 0; any_sep_issued[p] = 0; ended[p] = 0; ovl_seen[p] = 0;
      for (int i = 0; i < AXES_MAX; i++)
        sepax[p][i] = ($urandom_range(99) < ((p % 3 == 0) ? 0 : 4));
    end
    for (int p = 0; p < NPAIR; p++) begin
      repeat ($urandom_range(40)) @(negedge clk);
      new_valid  = 1;
      new_addr_a = 25'(p);
      new_addr_b = 25'(p + 1000);
      new_hdr_a  = node_hdr_t'(p);
      new_hdr_b  = node_hdr_t'(p + 7);
      @(posedge clk);
      while (!take) @(posedge clk);
      #1 new_valid = 0;
    end
    repeat (2 * AXES_MAX + LAT + 5) @(negedge clk);
    for (int p = 0; p < NPAIR; p++) begin
      check(ended[p] || killed[p], $sformatf("pair %0d neither finished nor stopped", p));
      check(ovl_seen[p] == ((ended[p] && !any_sep_issued[p]) ? 1 : 0),
            $sformatf("pair %0d overlap reported %0d times", p, ovl_seen[p]));
    end
  endtask

  initial begin
    cfg_n = 24; cfg_ntotal = 40; cfg_cont = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < AXES_MAX; i++) begin
      @(negedge clk);
      ax_we = 1; ax_idx = XW'(i);
      ax_pa = '0; ax_pa[0] = PW'(i);
    end
    @(negedge clk) ax_we = 0;
    run(0);
    check(n_cont == 0, "axes beyond n without continuation");
    run(1);
    check(n_kill > 20 && n_stale > 20 && n_cont > 20 && n_ovl > 50, "mechanisms exercised");
    $display("stops=%0d stale results ignored=%0d continued axes=%0d overlaps=%0d",
             n_kill, n_stale, n_cont, n_ovl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
