// bv_control: traversal control of the two bounding-volume hierarchies.
//
// A query starts with start: the pair of root nodes is pushed on the BV
// stack. The top of the stack is offered to GetData as its next job and
// popped when GetData accepts it. When the axis controller reports that a DOP
// pair overlaps on every tested axis (ovl_valid), the pair is refined:
//   both nodes leaves  -> one triangle-pair job {leaf A triangle, leaf B triangle}
//   node A inner       -> two DOP-pair jobs (A.left, B) and (A.right, B)
//   only B inner       -> two DOP-pair jobs (A, B.left) and (A, B.right)
// all pushed on the stack. Triangle jobs go through GetData to the triangle
// unit; tri_pending counts those whose result has not come back.
// The query is over when the stack, GetData, the axis controller and the
// pipeline are empty and no triangle test is pending: done pulses for one
// clock and collide tells whether any triangle pair intersected (hits are
// also reported to the host as they come, outside this block).
// Stack scheduling and the end condition follow the document; the order of
// descent (A first, both children at once) is this design's choice.
module bv_control (
  input  logic              clk,
  input  logic              rst_n,
  // host
  input  logic              start,
  input  logic [24:0]       root_a,
  input  logic [24:0]       root_b,
  output logic              busy,
  output logic              done,
  output logic              collide,
  // BV stack
  output logic              push0,
  output cd_pkg::job_t      push0_data,
  output logic              push1,
  output cd_pkg::job_t      push1_data,
  output logic              pop,
  input  cd_pkg::job_t      top,
  input  logic              top_valid,
  // GetData
  output logic              job_valid,
  output cd_pkg::job_t      job,
  input  logic              job_ready,
  input  logic              gd_idle,
  // Axis-control and pipeline
  input  logic              ovl_valid,
  input  cd_pkg::pipe_tag_t ovl_tag,
  input  logic              ax_issuing,
  input  logic              pl_busy,
  // triangle unit results
  input  logic              tri_res_valid,
  input  logic              tri_res_hit
);
  logic [15:0] tri_pending;
  logic        tri_issue;

  assign job_valid = busy && top_valid;
  assign job       = top;
  assign pop       = job_valid && job_ready;
  assign tri_issue = pop && top.is_tri;

  always_comb begin
    push0      = 1'b0;
    push1      = 1'b0;
    push0_data = '0;
    push1_data = '0;
    if (start && !busy) begin
      push0      = 1'b1;
      push0_data = cd_pkg::job_t'{is_tri: 1'b0, addr_a: root_a, addr_b: root_b};
    end else if (ovl_valid) begin
      push0 = 1'b1;
      if (ovl_tag.hdr_a.leaf && ovl_tag.hdr_b.leaf) begin
        push0_data = cd_pkg::job_t'{is_tri: 1'b1, addr_a: ovl_tag.hdr_a.left,
                                    addr_b: ovl_tag.hdr_b.left};
      end else if (!ovl_tag.hdr_a.leaf) begin
        push1      = 1'b1;
        push0_data = cd_pkg::job_t'{is_tri: 1'b0, addr_a: ovl_tag.hdr_a.right,
                                    addr_b: ovl_tag.addr_b};
        push1_data = cd_pkg::job_t'{is_tri: 1'b0, addr_a: ovl_tag.hdr_a.left,
                                    addr_b: ovl_tag.addr_b};
      end else begin
        push1      = 1'b1;
        push0_data = cd_pkg::job_t'{is_tri: 1'b0, addr_a: ovl_tag.addr_a,
                                    addr_b: ovl_tag.hdr_b.right};
        push1_data = cd_pkg::job_t'{is_tri: 1'b0, addr_a: ovl_tag.addr_a,
                                    addr_b: ovl_tag.hdr_b.left};
      end
    end
  end

  logic finished;
  assign finished = busy && !start && !top_valid && gd_idle && !ax_issuing && !pl_busy &&
                    !ovl_valid && (tri_pending == '0) && !push0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      collide     <= 1'b0;
      tri_pending <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        collide <= 1'b0;
      end else if (finished) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
      if (tri_res_valid && tri_res_hit) collide <= 1'b1;
      tri_pending <= tri_pending + (tri_issue ? 16'd1 : 16'd0) - (tri_res_valid ? 16'd1 : 16'd0);
    end
  end

`ifndef SYNTHESIS
  a_tri_res: assert property (@(posedge clk) disable iff (!rst_n)
                              tri_res_valid |-> (tri_pending != '0 || tri_issue))
    else $error("bv_control: triangle result without a pending triangle test");
`endif
endmodule
