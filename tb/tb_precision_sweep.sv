// tb_precision_sweep: the DOP overlap pipeline built at the fixed-point
// widths of the precision study (12, 16, 18, 19, 24, 35 and 44 bits for
// coefficients and mapping vectors, p' three bits wider), each fed the same
// random real-valued DOP pairs (half of them within 0.02 of touching) rounded the conservative way (coefficients
// up, mapping vectors and p' down). For every width and test: the result is
// compared with an integer reference of the rounded test, an axis whose exact
// (real-valued) image overlaps must never be reported separating, and the
// count of false positives (reported overlapping although the exact test
// separates) is printed per width; it must not grow with the width.
module tb_precision_sweep;
  localparam int K = 24, JW = 5, NW = 7, NT = 2000;
  localparam int WIDTHS [NW] = '{12, 16, 18, 19, 24, 35, 44};

  typedef logic signed [127:0] big_t;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [2:0][JW-1:0] ja = '0, jb = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // current test, as reals
  real ra[K], rb[K], rpa[3], rpb[3], rp;
  bit  exact_sep;
  int  false_pos [NW];
  bit  exp_q [NW][$];

  function automatic longint rnd_up(real x, int f);   return longint'($ceil(x * (2.0 ** f)));  endfunction
  function automatic longint rnd_dn(real x, int f);   return longint'($floor(x * (2.0 ** f))); endfunction

  for (genvar w = 0; w < NW; w++) begin : g_w
    localparam int DW = WIDTHS[w], PW = WIDTHS[w], TW = WIDTHS[w] + 3;
    localparam int FB = DW - 2, FC = PW - 2;
    logic [K-1:0][DW-1:0] a, b;
    logic [2:0][PW-1:0] pa, pb;
    logic [TW-1:0] p;
    logic out_valid, out_sep;

    dop_pipeline #(.K(K), .DW(DW), .PW(PW), .TW(TW), .MUL_EXTRA(2)) dut (
      .clk, .rst_n, .in_valid, .a, .b, .pa, .pb, .p, .ja, .jb, .out_valid, .out_sep);

    function automatic big_t image(logic [2:0][PW-1:0] pv, logic [K-1:0][DW-1:0] c,
                                   logic [2:0][JW-1:0] j, int off);
      big_t s = 0;
      for (int i = 0; i < 3; i++) begin
        big_t x = big_t'($signed(c[(int'(j[i]) + off) % K]));
        s += (big_t'($signed(pv[i])) + ((x < 0) ? big_t'(1) : big_t'(0))) * x;
      end
      return s;
    endfunction

    task automatic load();
      big_t amin, amax, bmin, bmax, pt;
      bit s;
      for (int i = 0; i < K; i++) begin a[i] = DW'(rnd_up(ra[i], FB)); b[i] = DW'(rnd_up(rb[i], FB)); end
      for (int i = 0; i < 3; i++) begin pa[i] = PW'(rnd_dn(rpa[i], FC)); pb[i] = PW'(rnd_dn(rpb[i], FC)); end
      p = TW'(rnd_dn(rp, FB));
      amin = image(pa, a, ja, 0);  amax = -image(pa, a, ja, K/2);
      bmin = image(pb, b, jb, 0);  bmax = -image(pb, b, jb, K/2);
      pt = big_t'($signed(p)) <<< FC;
      s = ((amin + pt) - bmax > 0) || (bmin - (amax + pt + (big_t'(1) <<< FC)) > 0);
      exp_q[w].push_back(s);
      checks++;
      if (s && !exact_sep) begin
        failures++;
        $display("width %0d: false negative", DW);
      end
      if (!s && exact_sep) false_pos[w]++;
    endtask

    always @(posedge clk) if (rst_n && out_valid) begin
      checks++;
      if (exp_q[w].size() == 0 || out_sep !== exp_q[w].pop_front()) begin
        failures++;
        $display("width %0d: pipeline result differs from the reference", DW);
      end
    end
  end

  function automatic real rimage(real pv[3], real c[K], logic [2:0][JW-1:0] j, int off);
    real s = 0.0;
    for (int i = 0; i < 3; i++) s += pv[i] * c[(int'(j[i]) + off) % K];
    return s;
  endfunction

  initial begin
    foreach (false_pos[w]) false_pos[w] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      @(negedge clk);
      for (int i = 0; i < K; i++) begin
        ra[i] = ($urandom_range(2000000) / 1000000.0) - 1.0;
        rb[i] = ($urandom_range(2000000) / 1000000.0) - 1.0;
      end
      for (int i = 0; i < 3; i++) begin
        rpa[i] = -($urandom_range(1000000) / 1000000.0);
        rpb[i] = -($urandom_range(1000000) / 1000000.0);
        ja[i] = JW'($urandom_range(K-1)); jb[i] = JW'($urandom_range(K-1));
      end
      // half of the tests put diff1 within +-0.02 of zero, where precision matters
      if (t % 2 == 0) rp = ($urandom_range(6000000) / 1000000.0) - 3.0;
      else rp = -(rimage(rpa, ra, ja, 0) + rimage(rpb, rb, jb, K/2)) +
                ($urandom_range(40000) / 1000000.0) - 0.02;
      exact_sep = (rimage(rpa, ra, ja, 0) + rp + rimage(rpb, rb, jb, K/2) > 0.0) ||
                  (rimage(rpb, rb, jb, 0) + rimage(rpa, ra, ja, K/2) - rp > 0.0);
      g_w[0].load(); g_w[1].load(); g_w[2].load(); g_w[3].load();
      g_w[4].load(); g_w[5].load(); g_w[6].load();
      in_valid = 1;
    end
    @(negedge clk) in_valid = 0;
    repeat (15) @(posedge clk);
    for (int w = 0; w < NW; w++) begin
      $display("width %0d bits: false positives %0d of %0d", WIDTHS[w], false_pos[w], NT);
      checks++;
      if (exp_q[w].size() != 0) begin failures++; $display("width %0d: results missing", WIDTHS[w]); end
      if (w > 0) begin
        checks++;
        if (false_pos[w] > false_pos[w-1]) begin
          failures++;
          $display("false positives grow from %0d to %0d bits", WIDTHS[w-1], WIDTHS[w]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
