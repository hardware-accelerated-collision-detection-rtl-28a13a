// tb_bv_control: BV-control with a BV stack, against stand-ins for GetData,
// Axis-control/pipeline and the triangle unit.
//
// Two complete binary trees (A: 4 levels, B: 3 levels, heap-numbered nodes)
// are described by node headers held in the testbench. Whether a DOP pair
// overlaps and whether a triangle pair intersects are fixed pseudo-random
// functions of the addresses. The stand-ins accept jobs with random delays,
// answer DOP jobs with an overlap report (or nothing) and triangle jobs with a
// result. Checked against a recursive reference traversal: the set of DOP
// pairs tested, the set of triangle pairs tested, each exactly once; done
// comes once, only after the last result, with collide = any hit; the query
// runs several times with different overlap densities.
module tb_bv_control;
  import cd_pkg::*;
  localparam int DA = 4, DB = 3;
  localparam int BASE_B = 4096, TRI_A = 100000, TRI_B = 200000;

  logic clk = 0, rst_n = 0, start = 0;
  logic [24:0] root_a, root_b;
  logic busy, done, collide;
  logic push0, push1, pop, top_valid, overflow;
  job_t push0_data, push1_data, top, job;
  logic [7:0] count;
  logic job_valid, job_ready, gd_idle, ovl_valid, ax_issuing, pl_busy, tri_res_valid, tri_res_hit;
  pipe_tag_t ovl_tag;

  int checks = 0, failures = 0;
  int density;

  bv_control dut (.*);
  bv_stack #(.W($bits(job_t)), .DEPTH(128)) u_stack (
    .clk, .rst_n, .push0, .push0_data, .push1, .push1_data, .pop, .top, .top_valid,
    .overflow, .count);

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

  // ------------------------------------------------------------ trees
  function automatic int addr_of(bit b, int h); return (b ? BASE_B : 0) + h * 16; endfunction
  function automatic node_hdr_t hdr_of(int addr);
    bit isb = addr >= BASE_B;
    int h = (addr - (isb ? BASE_B : 0)) / 16;
    int d = isb ? DB : DA;
    node_hdr_t r = '0;
    r.leaf = (h >= (1 << (d - 1)));
    if (r.leaf) r.left = 25'((isb ? TRI_B : TRI_A) + h);
    else begin r.left = 25'(addr_of(isb, 2 * h)); r.right = 25'(addr_of(isb, 2 * h + 1)); end
    return r;
  endfunction
  function automatic int hash2(int x, int y);
    int unsigned v = x * 32'h9E3779B1 ^ (y + 32'h7F4A7C15) * 32'h85EBCA77;
    v ^= v >> 15; v *= 32'h2C1B3C6D; v ^= v >> 13;
    return int'(v % 100);
  endfunction
  function automatic bit overlaps(int a, int b); return hash2(a, b) < density; endfunction
  function automatic bit hits(int a, int b);     return hash2(b + 7, a) < 30; endfunction

  // reference traversal
  int exp_dop [string];
  int exp_tri [string];
  bit exp_collide;
  function automatic void ref_traverse(int a, int b);
    node_hdr_t ha = hdr_of(a), hb = hdr_of(b);
    exp_dop[$sformatf("%0d_%0d", a, b)] = 1;
    if (!overlaps(a, b)) return;
    if (ha.leaf && hb.leaf) begin
      exp_tri[$sformatf("%0d_%0d", ha.left, hb.left)] = 1;
      if (hits(int'(ha.left), int'(hb.left))) exp_collide = 1;
    end else if (!ha.leaf) begin
      ref_traverse(int'(ha.left), b); ref_traverse(int'(ha.right), b);
    end else begin
      ref_traverse(a, int'(hb.left)); ref_traverse(a, int'(hb.right));
    end
  endfunction

  // ------------------------------------------------------------ stand-ins
  int seen_dop [string];
  int seen_tri [string];
  job_t gd_job;
  bit   gd_has = 0;
  int   gd_wait = 0;
  int   ovl_q_t [$];            // time stamps (cycle) when an overlap report is due
  pipe_tag_t ovl_q [$];
  int   tri_due [$];
  bit   tri_hit_q [$];
  int   cyc = 0;
  int   n_done = 0, n_push2 = 0, n_tri_push = 0;

  bit rdy_rand = 0;
  bit acc = 0;
  job_t acc_job;
  assign job_ready  = !gd_has && rdy_rand;
  assign gd_idle    = !gd_has;
  assign ax_issuing = (ovl_q.size() != 0);
  assign pl_busy    = 1'b0;

  always @(posedge clk) begin
    cyc++;
    acc     <= rst_n && job_valid && job_ready;
    acc_job <= job;
    if (rst_n) begin
      if (push0 && push1) n_push2++;
      if (push0 && push0_data.is_tri) n_tri_push++;
      if (done) n_done++;
    end
  end

  // The stand-ins change their outputs at the falling edge only, so the
  // block under test samples stable values at the rising edge.
  always @(negedge clk) if (rst_n) begin
    rdy_rand      = ($urandom_range(2) != 0);
    ovl_valid     = 1'b0;
    tri_res_valid = 1'b0;
    if (acc) begin
      gd_job  = acc_job;
      gd_has  = 1;
      gd_wait = $urandom_range(6);
    end else if (gd_has) begin
      if (gd_wait > 0) gd_wait--;
      else begin
        automatic string key = $sformatf("%0d_%0d", gd_job.addr_a, gd_job.addr_b);
        gd_has = 0;
        if (gd_job.is_tri) begin
          seen_tri[key] = seen_tri.exists(key) ? seen_tri[key] + 1 : 1;
          tri_due.push_back(cyc + $urandom_range(20) + 2);
          tri_hit_q.push_back(hits(int'(gd_job.addr_a), int'(gd_job.addr_b)));
        end else begin
          seen_dop[key] = seen_dop.exists(key) ? seen_dop[key] + 1 : 1;
          if (overlaps(int'(gd_job.addr_a), int'(gd_job.addr_b))) begin
            automatic pipe_tag_t t = '0;
            t.addr_a = gd_job.addr_a; t.addr_b = gd_job.addr_b;
            t.hdr_a = hdr_of(int'(gd_job.addr_a)); t.hdr_b = hdr_of(int'(gd_job.addr_b));
            t.last = 1;
            ovl_q.push_back(t);
            ovl_q_t.push_back(cyc + 30);
          end
        end
      end
    end
    if (ovl_q.size() != 0 && ovl_q_t[0] <= cyc) begin
      ovl_valid = 1'b1;
      ovl_tag   = ovl_q.pop_front();
      void'(ovl_q_t.pop_front());
    end
    if (tri_due.size() != 0 && tri_due[0] <= cyc) begin
      tri_res_valid = 1'b1;
      tri_res_hit   = tri_hit_q.pop_front();
      void'(tri_due.pop_front());
    end
  end

  task automatic query(int dens);
    int n_done0 = n_done;
    density = dens;
    exp_dop.delete(); exp_tri.delete(); seen_dop.delete(); seen_tri.delete();
    exp_collide = 0;
    ref_traverse(addr_of(0, 1), addr_of(1, 1));
    @(negedge clk);
    root_a = 25'(addr_of(0, 1)); root_b = 25'(addr_of(1, 1));
    start = 1;
    @(negedge clk) start = 0;
    while (!done) @(posedge clk);
    @(negedge clk);
    check(ovl_q.size() == 0 && tri_due.size() == 0 && !gd_has, "done before all work finished");
    check(collide == exp_collide, $sformatf("collide %0d expected %0d", collide, exp_collide));
    check(seen_dop.num() == exp_dop.num(), $sformatf("DOP pairs tested %0d expected %0d", seen_dop.num(), exp_dop.num()));
    foreach (exp_dop[k]) check(seen_dop.exists(k) && seen_dop[k] == 1, {"DOP pair ", k});
    check(seen_tri.num() == exp_tri.num(), $sformatf("triangle pairs %0d expected %0d", seen_tri.num(), exp_tri.num()));
    foreach (exp_tri[k]) check(seen_tri.exists(k) && seen_tri[k] == 1, {"triangle pair ", k});
    repeat (5) @(negedge clk);
    check(n_done == n_done0 + 1 && !busy, "done exactly once");
    $display("density %0d: DOP pairs %0d, triangle pairs %0d, collide %0d",
             dens, exp_dop.num(), exp_tri.num(), exp_collide);
  endtask

  initial begin
    ovl_valid = 0; tri_res_valid = 0; tri_res_hit = 0; ovl_tag = '0;
    root_a = '0; root_b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    query(0);
    query(60);
    query(75);
    query(85);
    query(100);
    check(!overflow, "stack overflow");
    check(n_push2 > 10 && n_tri_push > 10, "child and triangle scheduling exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
