// axis_control: schedules the axis tests of the DOP pair currently loaded.
//
// The host fills the axis table once per query with, for every candidate
// separating axis L_i, the precomputed mapping vectors P'_A, P'_B, the
// projected translation p' and the correspondences j_A, j_B (ax_we/ax_idx).
// cfg_n is n, the number of axes tested per DOP pair (24 in the document),
// cfg_ntotal the number of table entries loaded (N >= n).
//
// Operation: when GetData holds a prefetched pair (new_valid) and no pair is
// being issued, take is pulsed, the pair gets a new sequence number and from
// the next clock one axis test per clock is sent into the pipeline together
// with its PipeData tag. Axis i is the last one for the pair when
//   i = N-1, or i >= n-1 and (continuation is off or the next pair is ready),
// so with cfg_cont set, testing goes on beyond n axes for as long as the next
// pair is still loading. The take of the next pair happens in the clock the
// last axis is issued, so back-to-back pairs leave no bubble.
// Results: a result whose pair is already known to be separated is ignored.
// The first separating result of a pair marks its sequence number dead and,
// if the pair is still being issued, stops issuing at once (no further axis
// of it enters the pipeline). A non-separating result tagged last of a live
// pair means no tested axis separates the pair: it is reported on ovl_valid
// with its tag so that the BV controller schedules the children.
// Following the document: one axis per clock, stop on separation, ignore
// stale results, continuation while loading (its Fig. 7 variant). This
// design's own: the sequence-number mechanism and the table interface.
module axis_control #(
  parameter int unsigned K        = cd_pkg::K_DEF,
  parameter int unsigned PW       = cd_pkg::PW_DEF,
  parameter int unsigned TW       = cd_pkg::TW_DEF,
  parameter int unsigned AXES_MAX = cd_pkg::AXES_MAX_DEF,
  localparam int unsigned JW      = $clog2(K),
  localparam int unsigned XW      = $clog2(AXES_MAX),
  localparam int unsigned SEQW    = cd_pkg::SEQW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host: axis table and configuration
  input  logic                  ax_we,
  input  logic [XW-1:0]         ax_idx,
  input  logic [2:0][PW-1:0]    ax_pa,
  input  logic [2:0][PW-1:0]    ax_pb,
  input  logic [TW-1:0]         ax_p,
  input  logic [2:0][JW-1:0]    ax_ja,
  input  logic [2:0][JW-1:0]    ax_jb,
  input  logic [XW:0]           cfg_n,       // n, 1..AXES_MAX
  input  logic [XW:0]           cfg_ntotal,  // N, n..AXES_MAX
  input  logic                  cfg_cont,    // keep testing while the next pair loads
  // GetData
  input  logic                  new_valid,
  input  logic [24:0]           new_addr_a,
  input  logic [24:0]           new_addr_b,
  input  cd_pkg::node_hdr_t     new_hdr_a,
  input  cd_pkg::node_hdr_t     new_hdr_b,
  output logic                  take,
  // pipeline input and PipeData tag
  output logic                  pl_valid,
  output logic [2:0][PW-1:0]    pl_pa,
  output logic [2:0][PW-1:0]    pl_pb,
  output logic [TW-1:0]         pl_p,
  output logic [2:0][JW-1:0]    pl_ja,
  output logic [2:0][JW-1:0]    pl_jb,
  output cd_pkg::pipe_tag_t     pl_tag,
  // pipeline output and PipeData tag
  input  logic                  res_valid,
  input  logic                  res_sep,
  input  cd_pkg::pipe_tag_t     res_tag,
  // overlapping pair (all issued axes non-separating)
  output logic                  ovl_valid,
  output cd_pkg::pipe_tag_t     ovl_tag,
  output logic                  issuing
);
  typedef struct packed {
    logic [2:0][PW-1:0] pa;
    logic [2:0][PW-1:0] pb;
    logic [TW-1:0]      p;
    logic [2:0][JW-1:0] ja;
    logic [2:0][JW-1:0] jb;
  } axis_t;

  axis_t axis_tab [AXES_MAX];
  always_ff @(posedge clk)
    if (ax_we) axis_tab[ax_idx] <= axis_t'{ax_pa, ax_pb, ax_p, ax_ja, ax_jb};

  logic [XW:0]            idx;
  logic [SEQW-1:0]        seq;
  logic [(1<<SEQW)-1:0]   dead;
  logic [24:0]            addr_a, addr_b;
  cd_pkg::node_hdr_t      hdr_a, hdr_b;

  logic res_live, kill_now, last_now;
  assign res_live  = res_valid && !dead[res_tag.seq];
  assign kill_now  = res_live && res_sep && issuing && (res_tag.seq == seq);
  assign last_now  = (idx == cfg_ntotal - 1'b1) ||
                     ((idx >= cfg_n - 1'b1) && (!cfg_cont || new_valid));
  assign pl_valid  = issuing && !kill_now;
  assign take      = new_valid && (!issuing || kill_now || (pl_valid && last_now));

  axis_t cur_axis;
  assign cur_axis = axis_tab[idx[XW-1:0]];
  assign pl_pa = cur_axis.pa;
  assign pl_pb = cur_axis.pb;
  assign pl_p  = cur_axis.p;
  assign pl_ja = cur_axis.ja;
  assign pl_jb = cur_axis.jb;
  assign pl_tag = cd_pkg::pipe_tag_t'{seq: seq, last: last_now, addr_a: addr_a,
                                      addr_b: addr_b, hdr_a: hdr_a, hdr_b: hdr_b};

  assign ovl_valid = res_live && !res_sep && res_tag.last;
  assign ovl_tag   = res_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      idx     <= '0;
      seq     <= '0;
      dead    <= '0;
    end else begin
      if (res_live && res_sep) dead[res_tag.seq] <= 1'b1;
      if (take) begin
        issuing <= 1'b1;
        idx     <= '0;
        seq     <= seq + 1'b1;
        dead[seq + 1'b1] <= 1'b0;
      end else if (kill_now) begin
        issuing <= 1'b0;
      end else if (pl_valid) begin
        if (last_now) issuing <= 1'b0;
        else          idx <= idx + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      addr_a <= new_addr_a;
      addr_b <= new_addr_b;
      hdr_a  <= new_hdr_a;
      hdr_b  <= new_hdr_b;
    end
  end
endmodule
