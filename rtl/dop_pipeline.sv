// dop_pipeline: fixed-point separating-axis test of two k-DOPs, one candidate
// axis per clock.
//
// For the axis presented with in_valid the pipeline evaluates
//   diff1' = P'_A.a'  + 2^-c sn(a')  + P'_B.b'_k + 2^-c sn(b'_k) + p'
//   diff2' = P'_B.b'  + 2^-c sn(b')  + P'_A.a'_k + 2^-c sn(a'_k) - (p' + 2^-z)
// and reports out_sep = (diff1' > 0) or (diff2' > 0), which proves that the
// axis separates the two DOPs. a' are the three coefficients a[ja[0..2]] of
// DOP A that meet in its minimal vertex, a'_k the antiparallel ones
// a[ja[i]+K/2 mod K] that meet in its maximal vertex; b', b'_k likewise for
// DOP B with jb. sn(x) is the sum of the negative entries of x: adding it is
// the same as adding 2^-c to P' before multiplying a negative coefficient,
// which keeps the fixed-point image of each DOP a superset of the exact one,
// so the test gives no false negatives.
//
// Number scaling: coefficients have b = DW-2 fraction bits, P' entries
// c = PW-2, p' has z = b. Products therefore have b+c fraction bits; the
// correction 2^-c*sn(x) is sn(x) itself at that scale (the multiply by 2^-c is
// only an alignment) and p' is shifted left by c. The test "> 0" is done as the
// document describes, by negating the AND of two sign bits; to make the sign
// bit mean "<= 0" one LSB is subtracted from each sum, folded into the p' term.
//
// Stages (as in the document: selection, four stages of products and
// correction, one stage joining both sums, one result stage, plus MUL_EXTRA
// extra multiplier stages for 35-bit products on 18-bit multipliers):
//   S1          select the 12 coefficients (the +K/2 set by feeding the
//               multiplexers a rotated copy of the coefficient vector)
//   S2..S2+ME   12 products P'.coefficient (pipe_mul); negative coefficients
//               are summed concurrently and delayed alongside
//   next 3      adder tree of the six products per diff, p' term joined
//   next 1      products + correction
//   last        sign test, out_sep registered
// Latency LATENCY = 7 + MUL_EXTRA clocks from in_valid to out_valid; one new
// axis test is accepted every clock, no stalls. The adder tree layout, the
// number formats and the folded -1 LSB are this design's choices.
module dop_pipeline #(
  parameter int unsigned K         = cd_pkg::K_DEF,
  parameter int unsigned DW        = cd_pkg::DW_DEF,
  parameter int unsigned PW        = cd_pkg::PW_DEF,
  parameter int unsigned TW        = cd_pkg::TW_DEF,
  parameter int unsigned MUL_EXTRA = cd_pkg::MUL_EXTRA_DEF,
  localparam int unsigned JW       = $clog2(K),
  localparam int unsigned LATENCY  = 7 + MUL_EXTRA
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [K-1:0][DW-1:0]          a,      // coefficients of DOP A (tree O)
  input  logic [K-1:0][DW-1:0]          b,      // coefficients of DOP B (tree Q)
  input  logic [2:0][PW-1:0]            pa,     // P'_A of this axis
  input  logic [2:0][PW-1:0]            pb,     // P'_B of this axis
  input  logic [TW-1:0]                 p,      // p' = floor(L.T) of this axis
  input  logic [2:0][JW-1:0]            ja,     // correspondences j_A
  input  logic [2:0][JW-1:0]            jb,     // correspondences j_B
  output logic                          out_valid,
  output logic                          out_sep  // axis separates the DOPs
);
  localparam int unsigned FC = PW - 2;          // c
  localparam int unsigned MW = DW + PW;         // product width
  localparam int unsigned SW = MW + 4;          // sum width (8 terms + p')
  localparam int unsigned MS = MUL_EXTRA + 1;   // multiplier stages

  typedef logic signed [SW-1:0] sum_t;

  // ------------------------------------------------------------ valid chain
  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

  // ------------------------------------------------------------ S1 selection
  logic [K-1:0][DW-1:0] a_rot, b_rot;           // coefficient i+K/2 at index i
  always_comb begin
    for (int i = 0; i < K; i++) begin
      a_rot[i] = a[(i + K/2) % K];
      b_rot[i] = b[(i + K/2) % K];
    end
  end

  logic signed [DW-1:0] s_a [3], s_ak [3], s_b [3], s_bk [3];
  logic signed [PW-1:0] s_pa [3], s_pb [3];
  logic signed [TW-1:0] s_p;
  always_ff @(posedge clk) begin
    for (int i = 0; i < 3; i++) begin
      s_a[i]  <= a[ja[i]];
      s_ak[i] <= a_rot[ja[i]];
      s_b[i]  <= b[jb[i]];
      s_bk[i] <= b_rot[jb[i]];
      s_pa[i] <= pa[i];
      s_pb[i] <= pb[i];
    end
    s_p <= p;
  end

  // ------------------------------------------------------------ products
  // diff1 uses P'_A.a' and P'_B.b'_k, diff2 uses P'_B.b' and P'_A.a'_k.
  logic signed [MW-1:0] m_a [3], m_ak [3], m_b [3], m_bk [3];
  for (genvar i = 0; i < 3; i++) begin : g_mul
    pipe_mul #(.AW(PW), .BW(DW), .STAGES(MS)) u_ma  (.clk, .a(s_pa[i]), .b(s_a[i]),  .p(m_a[i]));
    pipe_mul #(.AW(PW), .BW(DW), .STAGES(MS)) u_mak (.clk, .a(s_pa[i]), .b(s_ak[i]), .p(m_ak[i]));
    pipe_mul #(.AW(PW), .BW(DW), .STAGES(MS)) u_mb  (.clk, .a(s_pb[i]), .b(s_b[i]),  .p(m_b[i]));
    pipe_mul #(.AW(PW), .BW(DW), .STAGES(MS)) u_mbk (.clk, .a(s_pb[i]), .b(s_bk[i]), .p(m_bk[i]));
  end

  // ------------------------------------------------------------ correction
  // Sum of the negative coefficients of each vertex, concurrently with the
  // products, and the p' terms; both delayed to meet the products.
  function automatic sum_t neg_sum(logic signed [DW-1:0] x0, logic signed [DW-1:0] x1,
                                   logic signed [DW-1:0] x2);
    sum_t s;
    s = '0;
    if (x0[DW-1]) s += sum_t'(x0);
    if (x1[DW-1]) s += sum_t'(x1);
    if (x2[DW-1]) s += sum_t'(x2);
    return s;
  endfunction

  sum_t c1_d [MS], c2_d [MS];   // 2^-c sn(a') + 2^-c sn(b'_k), and the diff2 pair
  sum_t t1_d [MS], t2_d [MS];   // p' terms, each minus one LSB
  always_ff @(posedge clk) begin
    c1_d[0] <= neg_sum(s_a[0], s_a[1], s_a[2]) + neg_sum(s_bk[0], s_bk[1], s_bk[2]);
    c2_d[0] <= neg_sum(s_b[0], s_b[1], s_b[2]) + neg_sum(s_ak[0], s_ak[1], s_ak[2]);
    t1_d[0] <= (sum_t'(s_p) <<< FC) - sum_t'(1);
    t2_d[0] <= -(sum_t'(s_p) <<< FC) - (sum_t'(1) <<< FC) - sum_t'(1);
    for (int s = 1; s < MS; s++) begin
      c1_d[s] <= c1_d[s-1];
      c2_d[s] <= c2_d[s-1];
      t1_d[s] <= t1_d[s-1];
      t2_d[s] <= t2_d[s-1];
    end
  end

  // ------------------------------------------------------------ adder tree
  sum_t x1_0, x1_1, x1_2, x2_0, x2_1, x2_2;     // level 1
  sum_t c1_l1, c2_l1, t1_l1, t2_l1;
  sum_t y1_0, y1_1, y2_0, y2_1;                 // level 2
  sum_t c1_l2, c2_l2;
  sum_t z1, z2, c1_l3, c2_l3;                   // level 3: scalar products + p'
  sum_t d1, d2;                                 // diff' minus one LSB
  always_ff @(posedge clk) begin
    x1_0 <= sum_t'(m_a[0])  + sum_t'(m_a[1]);
    x1_1 <= sum_t'(m_a[2])  + sum_t'(m_bk[0]);
    x1_2 <= sum_t'(m_bk[1]) + sum_t'(m_bk[2]);
    x2_0 <= sum_t'(m_b[0])  + sum_t'(m_b[1]);
    x2_1 <= sum_t'(m_b[2])  + sum_t'(m_ak[0]);
    x2_2 <= sum_t'(m_ak[1]) + sum_t'(m_ak[2]);
    c1_l1 <= c1_d[MS-1];
    c2_l1 <= c2_d[MS-1];
    t1_l1 <= t1_d[MS-1];
    t2_l1 <= t2_d[MS-1];

    y1_0 <= x1_0 + x1_1;
    y1_1 <= x1_2 + t1_l1;
    y2_0 <= x2_0 + x2_1;
    y2_1 <= x2_2 + t2_l1;
    c1_l2 <= c1_l1;
    c2_l2 <= c2_l1;

    z1 <= y1_0 + y1_1;
    z2 <= y2_0 + y2_1;
    c1_l3 <= c1_l2;
    c2_l3 <= c2_l2;

    d1 <= z1 + c1_l3;
    d2 <= z2 + c2_l3;
  end

  // ------------------------------------------------------------ result
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_sep <= 1'b0;
    else        out_sep <= !(d1[SW-1] && d2[SW-1]);
  end

endmodule
