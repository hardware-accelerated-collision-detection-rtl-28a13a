// collision_top: hierarchical collision detection of two rigid objects by
// simultaneous traversal of their k-DOP bounding-volume hierarchies.
//
// Blocks and data flow:
//   bv_control + bv_stack   depth-first schedule of DOP-pair and triangle-pair
//                           tests; start pushes the pair of roots
//   getdata                 prefetches both DOPs of the next pair from memory
//                           (a_new/b_new) while the current pair (a/b) is
//                           tested; fetches triangle data for the triangle unit
//   axis_control            holds the host's axis table; issues one axis test
//                           per clock, stops a pair at its first separating
//                           axis, reports pairs that overlap on all tested axes
//   dop_pipeline            fixed-point separating-axis test, LATENCY clocks
//   pipedata                pair bookkeeping shifted alongside the pipeline
// Outside this module: the host (writes the axis table, gives the root node
// addresses, pulses start, receives done/collide and every intersecting
// triangle pair on hit_*), the DDR memory (mem_* read port, see getdata) and
// the triangle-triangle intersection unit (tri_* data stream out, tri_res_*
// result in; it echoes the triangle addresses of the pair it tested).
// Two output groups are plain wires: tri_data is the memory read data itself
// (triangle words go to the triangle unit without passing the a/b registers),
// and hit_* is the triangle unit's result forwarded to the host unchanged.
// The query ends with a one-clock done; collide then says whether any
// triangle pair intersected. stack_overflow is sticky and means the BV stack
// was too small for the query (the result is then not trustworthy).
// The structure follows the document's block diagram; port protocols are
// this design's choices.
module collision_top #(
  parameter int unsigned K           = cd_pkg::K_DEF,
  parameter int unsigned DW          = cd_pkg::DW_DEF,
  parameter int unsigned PW          = cd_pkg::PW_DEF,
  parameter int unsigned TW          = cd_pkg::TW_DEF,
  parameter int unsigned MUL_EXTRA   = cd_pkg::MUL_EXTRA_DEF,
  parameter int unsigned AXES_MAX    = cd_pkg::AXES_MAX_DEF,
  parameter int unsigned STACK_DEPTH = 128,
  parameter int unsigned TRI_WORDS   = cd_pkg::TRI_WORDS_DEF,
  localparam int unsigned JW         = $clog2(K),
  localparam int unsigned XW         = $clog2(AXES_MAX)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host
  input  logic                  ax_we,
  input  logic [XW-1:0]         ax_idx,
  input  logic [2:0][PW-1:0]    ax_pa,
  input  logic [2:0][PW-1:0]    ax_pb,
  input  logic [TW-1:0]         ax_p,
  input  logic [2:0][JW-1:0]    ax_ja,
  input  logic [2:0][JW-1:0]    ax_jb,
  input  logic [XW:0]           cfg_n,
  input  logic [XW:0]           cfg_ntotal,
  input  logic                  cfg_cont,
  input  logic                  start,
  input  logic [24:0]           root_a,
  input  logic [24:0]           root_b,
  output logic                  busy,
  output logic                  done,
  output logic                  collide,
  output logic                  stack_overflow,
  output logic                  hit_valid,
  output logic [24:0]           hit_addr_a,
  output logic [24:0]           hit_addr_b,
  // DDR memory read port
  output logic                  mem_req_valid,
  output logic [24:0]           mem_req_addr,
  output logic [7:0]            mem_req_len,
  input  logic                  mem_req_ready,
  input  logic                  mem_rd_valid,
  input  logic [63:0]           mem_rd_data,
  // triangle unit
  output logic                  tri_valid,
  output logic [63:0]           tri_data,
  output logic                  tri_sel,
  output logic                  tri_last,
  output logic [24:0]           tri_addr_a,
  output logic [24:0]           tri_addr_b,
  input  logic                  tri_res_valid,
  input  logic                  tri_res_hit,
  input  logic [24:0]           tri_res_addr_a,
  input  logic [24:0]           tri_res_addr_b
);
  localparam int unsigned LATENCY = 7 + MUL_EXTRA;
  localparam int unsigned TAGW    = $bits(cd_pkg::pipe_tag_t);
  localparam int unsigned JOBW    = $bits(cd_pkg::job_t);

  // BV stack
  logic push0, push1, pop, top_valid;
  cd_pkg::job_t push0_data, push1_data, top;
  logic [$clog2(STACK_DEPTH+1)-1:0] stack_count;

  // GetData
  logic job_valid, job_ready, gd_idle, new_valid, take;
  cd_pkg::job_t job;
  logic [24:0] new_addr_a, new_addr_b;
  cd_pkg::node_hdr_t new_hdr_a, new_hdr_b;
  logic [K-1:0][DW-1:0] cur_a, cur_b;

  // axis control / pipeline / PipeData
  logic pl_valid, res_valid, res_sep, tag_valid, ovl_valid, ax_issuing, pl_busy;
  logic [2:0][PW-1:0] pl_pa, pl_pb;
  logic [TW-1:0]      pl_p;
  logic [2:0][JW-1:0] pl_ja, pl_jb;
  cd_pkg::pipe_tag_t  pl_tag, res_tag, ovl_tag;
  logic [TAGW-1:0]    res_tag_bits;

  bv_control u_bv_control (
    .clk, .rst_n, .start, .root_a, .root_b, .busy, .done, .collide,
    .push0, .push0_data, .push1, .push1_data, .pop, .top, .top_valid,
    .job_valid, .job, .job_ready, .gd_idle,
    .ovl_valid, .ovl_tag, .ax_issuing, .pl_busy,
    .tri_res_valid, .tri_res_hit
  );

  bv_stack #(.W(JOBW), .DEPTH(STACK_DEPTH)) u_bv_stack (
    .clk, .rst_n, .push0, .push0_data(JOBW'(push0_data)), .push1,
    .push1_data(JOBW'(push1_data)), .pop, .top, .top_valid,
    .overflow(stack_overflow), .count(stack_count)
  );

  getdata #(.K(K), .DW(DW), .TRI_WORDS(TRI_WORDS)) u_getdata (
    .clk, .rst_n, .job_valid, .job, .job_ready,
    .mem_req_valid, .mem_req_addr, .mem_req_len, .mem_req_ready, .mem_rd_valid, .mem_rd_data,
    .new_valid, .new_addr_a, .new_addr_b, .new_hdr_a, .new_hdr_b, .take,
    .cur_a, .cur_b,
    .tri_valid, .tri_data, .tri_sel, .tri_last, .tri_addr_a, .tri_addr_b,
    .idle(gd_idle)
  );

  axis_control #(.K(K), .PW(PW), .TW(TW), .AXES_MAX(AXES_MAX)) u_axis_control (
    .clk, .rst_n, .ax_we, .ax_idx, .ax_pa, .ax_pb, .ax_p, .ax_ja, .ax_jb,
    .cfg_n, .cfg_ntotal, .cfg_cont,
    .new_valid, .new_addr_a, .new_addr_b, .new_hdr_a, .new_hdr_b, .take,
    .pl_valid, .pl_pa, .pl_pb, .pl_p, .pl_ja, .pl_jb, .pl_tag,
    .res_valid, .res_sep, .res_tag, .ovl_valid, .ovl_tag, .issuing(ax_issuing)
  );

  dop_pipeline #(.K(K), .DW(DW), .PW(PW), .TW(TW), .MUL_EXTRA(MUL_EXTRA)) u_pipeline (
    .clk, .rst_n, .in_valid(pl_valid), .a(cur_a), .b(cur_b),
    .pa(pl_pa), .pb(pl_pb), .p(pl_p), .ja(pl_ja), .jb(pl_jb),
    .out_valid(res_valid), .out_sep(res_sep)
  );

  pipedata #(.W(TAGW), .DEPTH(LATENCY)) u_pipedata (
    .clk, .rst_n, .in_valid(pl_valid), .in_tag(TAGW'(pl_tag)),
    .out_valid(tag_valid), .out_tag(res_tag_bits), .any_valid(pl_busy)
  );
  assign res_tag = cd_pkg::pipe_tag_t'(res_tag_bits);

  // Every intersecting triangle pair goes to the host at once.
  assign hit_valid  = tri_res_valid && tri_res_hit;
  assign hit_addr_a = tri_res_addr_a;
  assign hit_addr_b = tri_res_addr_b;

`ifndef SYNTHESIS
  a_tag_in_step: assert property (@(posedge clk) disable iff (!rst_n) tag_valid == res_valid)
    else $error("collision_top: PipeData out of step with the pipeline");
`endif
endmodule
