// tb_dop_pipeline: self-checking test of the fixed-point DOP overlap pipeline.
//
// Three groups of checks, with the default 24-DOP, 35-bit configuration:
//  1. latency: a single test enters, its result must leave exactly
//     7 + MUL_EXTRA = 9 clocks later;
//  2. boundary cases with all mapping vectors zero, where diff1' = p' and
//     diff2' = -(p' + 2^-z): the result must flip exactly between "= 0"
//     (overlap) and "one LSB above 0" (separation); and tests within a few
//     LSBs of zero with tiny operands, where only the rounding correction
//     for negative coefficients decides the outcome;
//  3. random streams, one test per clock: random integer operands compared
//     with a reference that rounds the mapping vector up by 2^-c for every
//     negative coefficient (the form the error analysis starts from, not the
//     sum-of-negatives form of the RTL); and random real-valued DOPs rounded
//     the way the host would round them, checking that an axis the exact
//     arithmetic finds overlapping is never reported separating (no false
//     negatives) and that the deviation of the fixed-point result stays in
//     0 <= err <= sqrt(3)*2^(1-b) + 6*2^-c + 2^-z.
module tb_dop_pipeline;
  import cd_pkg::*;
  localparam int K = K_DEF, DW = DW_DEF, PW = PW_DEF, TW = TW_DEF;
  localparam int JW = $clog2(K), FB = DW - 2, FC = PW - 2;
  localparam int LAT = 7 + MUL_EXTRA_DEF;

  typedef logic signed [127:0] big_t;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [K-1:0][DW-1:0] a, b;
  logic [2:0][PW-1:0] pa, pb;
  logic [TW-1:0] p;
  logic [2:0][JW-1:0] ja, jb;
  logic out_valid, out_sep;

  int checks = 0, failures = 0;
  int n_sep = 0, n_ovl = 0;

  dop_pipeline dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- reference
  function automatic big_t sx_c(logic [DW-1:0] v); return big_t'($signed(v)); endfunction
  function automatic big_t sx_p(logic [PW-1:0] v); return big_t'($signed(v)); endfunction

  // Image end of one DOP: sum over i of (P'_i + 2^-c [x_i < 0]) * x_i, scale 2^-(b+c)
  function automatic big_t image(logic [2:0][PW-1:0] pv, logic [K-1:0][DW-1:0] c,
                                 logic [2:0][JW-1:0] j, int off);
    big_t s = 0;
    for (int i = 0; i < 3; i++) begin
      big_t x = sx_c(c[(int'(j[i]) + off) % K]);
      big_t pp = sx_p(pv[i]) + ((x < 0) ? big_t'(1) : big_t'(0));
      s += pp * x;
    end
    return s;
  endfunction

  function automatic bit ref_sep(output big_t d1, output big_t d2);
    big_t amin, amax, bmin, bmax, pt;
    amin = image(pa, a, ja, 0);
    amax = -image(pa, a, ja, K/2);
    bmin = image(pb, b, jb, 0);
    bmax = -image(pb, b, jb, K/2);
    pt   = big_t'($signed(p)) <<< FC;
    d1 = (amin + pt) - bmax;
    d2 = bmin - (amax + pt + (big_t'(1) <<< FC));
    return (d1 > 0) || (d2 > 0);
  endfunction

  // expected results, in order
  bit exp_q[$];
  int cyc = 0, in_cyc[$], lat_seen = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid) in_cyc.push_back(cyc);
    if (out_valid && in_cyc.size() != 0) lat_seen = cyc - in_cyc.pop_front();
  end

  always @(posedge clk) if (out_valid) begin
    bit e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("result without a test");
    end else begin
      e = exp_q.pop_front();
      if (out_sep !== e) begin
        failures++;
        $display("mismatch: sep=%0d expected %0d", out_sep, e);
      end
      if (e) n_sep++; else n_ovl++;
    end
  end

  task automatic push_current();
    big_t d1, d2;
    exp_q.push_back(ref_sep(d1, d2));
  endtask

  function automatic logic [DW-1:0] rnd_coef();
    // uniform in [-1, 1] at b fraction bits
    longint r = longint'({$urandom, $urandom}) % ((longint'(1) <<< (FB + 1)) + 1);
    if (r < 0) r = -r;
    return DW'(r - (longint'(1) <<< FB));
  endfunction
  function automatic logic [PW-1:0] rnd_map();
    longint r = longint'({$urandom, $urandom}) % ((longint'(1) <<< FC) + 1);
    if (r < 0) r = -r;
    return PW'(-r);
  endfunction

  task automatic random_ints();
    for (int i = 0; i < K; i++) begin a[i] = rnd_coef(); b[i] = rnd_coef(); end
    for (int i = 0; i < 3; i++) begin
      pa[i] = rnd_map(); pb[i] = rnd_map();
      ja[i] = JW'($urandom_range(K-1)); jb[i] = JW'($urandom_range(K-1));
    end
    p = TW'(longint'($urandom_range(6000)) * (longint'(1) <<< (FB - 10)) - (longint'(3000) <<< (FB - 10)));
  endtask

  // real-valued DOPs rounded as the host does
  real ra[K], rb[K], rpa[3], rpb[3], rp;
  task automatic random_reals();
    for (int i = 0; i < K; i++) begin
      ra[i] = ($urandom_range(2000000) / 1000000.0) - 1.0;
      rb[i] = ($urandom_range(2000000) / 1000000.0) - 1.0;
      a[i] = DW'(longint'($ceil(ra[i] * (2.0 ** FB))));
      b[i] = DW'(longint'($ceil(rb[i] * (2.0 ** FB))));
    end
    for (int i = 0; i < 3; i++) begin
      rpa[i] = -($urandom_range(1000000) / 1000000.0);
      rpb[i] = -($urandom_range(1000000) / 1000000.0);
      pa[i] = PW'(longint'($floor(rpa[i] * (2.0 ** FC))));
      pb[i] = PW'(longint'($floor(rpb[i] * (2.0 ** FC))));
      ja[i] = JW'($urandom_range(K-1)); jb[i] = JW'($urandom_range(K-1));
    end
    rp = ($urandom_range(6000000) / 1000000.0) - 3.0;
    p  = TW'(longint'($floor(rp * (2.0 ** FB))));
  endtask

  function automatic real rimage(real pv[3], real c[K], logic [2:0][JW-1:0] j, int off);
    real s = 0.0;
    for (int i = 0; i < 3; i++) s += pv[i] * c[(int'(j[i]) + off) % K];
    return s;
  endfunction

  function automatic real big2real(big_t v);
    real r;
    bit neg = v < 0;
    big_t m = neg ? -v : v;
    r = real'(longint'(m >>> 64)) * (2.0 ** 64) + real'(longint'(m[63:32])) * (2.0 ** 32) +
        real'(longint'(m[31:0]));
    return neg ? -r : r;
  endfunction

  int n_real_ovl = 0;

  task automatic check_reals();
    real d1, d2, dexact, dfix, err, bound;
    big_t f1, f2;
    bit s;
    d1 = rimage(rpa, ra, ja, 0) + rp + rimage(rpb, rb, jb, K/2);   // a_min + p - b_max
    d2 = rimage(rpb, rb, jb, 0) + rimage(rpa, ra, ja, K/2) - rp;   // b_min - (a_max + p)
    dexact = (d1 > d2) ? d1 : d2;
    s = ref_sep(f1, f2);
    dfix = big2real((f1 > f2) ? f1 : f2) / (2.0 ** (FB + FC));
    err = dexact - dfix;
    bound = $sqrt(3.0) * (2.0 ** (1 - FB)) + 6.0 * (2.0 ** (-FC)) + 2.0 ** (-FB);
    checks++;
    if (err < -1e-12 || err > bound + 1e-12) begin
      failures++;
      $display("fixed-point error %g outside [0, %g]", err, bound);
    end
    if (dexact <= 0.0) n_real_ovl++;
  endtask

  initial begin
    int lat;
    a = '0; b = '0; pa = '0; pb = '0; p = '0; ja = '0; jb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // 1. latency
    random_ints();
    push_current();
    @(negedge clk) in_valid = 1;
    @(negedge clk) in_valid = 0;
    repeat (LAT + 3) @(negedge clk);
    lat = lat_seen;
    checks++;
    if (lat != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", lat, LAT);
    end
    @(posedge clk);

    // 2. boundary: all P' = 0, positive coefficients
    for (int i = 0; i < K; i++) begin a[i] = DW'(1) <<< (FB - 1); b[i] = DW'(1) <<< (FB - 1); end
    pa = '0; pb = '0;
    foreach (ja[i]) begin ja[i] = JW'(i); jb[i] = JW'(i + 5); end
    for (int v = -3; v <= 2; v++) begin
      p = TW'(v);
      @(negedge clk);
      in_valid = 1;
      exp_q.push_back((v >= 1) || (v <= -2));
      @(posedge clk);
      #1 in_valid = 0;
    end
    repeat (LAT + 2) @(posedge clk);

    // 2b. a few LSBs around zero, where only the rounding correction for
    //     negative coefficients decides: tiny mapping vectors and coefficients
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      for (int i = 0; i < K; i++) begin
        a[i] = DW'($urandom_range(16) - 8);
        b[i] = DW'($urandom_range(16) - 8);
      end
      for (int i = 0; i < 3; i++) begin
        pa[i] = PW'(-$urandom_range(3));
        pb[i] = PW'(-$urandom_range(3));
        ja[i] = JW'($urandom_range(K-1)); jb[i] = JW'($urandom_range(K-1));
      end
      p = TW'(-$urandom_range(1));
      push_current();
      in_valid = 1;
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 2) @(posedge clk);

    // 3a. random integer operands, back to back
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      random_ints();
      push_current();
      in_valid = 1;
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 2) @(posedge clk);

    // 3b. real-valued DOPs
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      random_reals();
      push_current();
      check_reals();
      in_valid = 1;
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 2) @(posedge clk);

    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    checks++;
    if (n_sep < 100 || n_ovl < 100) begin
      failures++;
      $display("too few cases of one kind: sep=%0d overlap=%0d", n_sep, n_ovl);
    end
    $display("separating=%0d overlapping=%0d exact-overlapping(real)=%0d", n_sep, n_ovl, n_real_ovl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
