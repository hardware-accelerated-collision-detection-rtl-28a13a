// getdata: fetches DOP coefficients and triangle data from the external
// DDR memory while the pipeline works on the current DOP pair.
//
// A job (from the BV controller) is either a DOP pair or a triangle pair.
// For a DOP pair both nodes are read, each as one burst of 1+NCW words
// (header, then NCW = ceil(K*DW/64) coefficient words, see cd_pkg), into the
// "new" buffers a_new/b_new; new_valid then tells the axis controller that the
// next pair is ready. When the axis controller is done with the current pair
// it pulses take: the new buffers are unpacked into the "current" registers
// a/b that feed the pipeline, new_valid drops and the next job can be fetched.
// So one pair is prefetched while the previous one is tested.
// For a triangle pair the two triangle records (TRI_WORDS words each, A then
// B) are read and streamed to the triangle unit as they arrive (tri_valid,
// tri_sel = 0 for A / 1 for B, tri_last on the very last word); the triangle
// unit has to accept one word per clock.
//
// Memory port: a request (mem_req_valid/ready, word address, burst length) is
// answered by mem_req_len words on mem_rd_valid/mem_rd_data, in order, with
// any latency; one request is outstanding at a time.
// The double buffer (a_new/b_new -> a/b) and the sharing of the memory between
// DOP and triangle data follow the document; the node layout, burst and
// handshake are this design's choices.
module getdata #(
  parameter int unsigned K         = cd_pkg::K_DEF,
  parameter int unsigned DW        = cd_pkg::DW_DEF,
  parameter int unsigned TRI_WORDS = cd_pkg::TRI_WORDS_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // jobs from BV-control
  input  logic                 job_valid,
  input  cd_pkg::job_t         job,
  output logic                 job_ready,
  // memory read port
  output logic                 mem_req_valid,
  output logic [24:0]          mem_req_addr,
  output logic [7:0]           mem_req_len,
  input  logic                 mem_req_ready,
  input  logic                 mem_rd_valid,
  input  logic [63:0]          mem_rd_data,
  // prefetched pair, to Axis-control
  output logic                 new_valid,
  output logic [24:0]          new_addr_a,
  output logic [24:0]          new_addr_b,
  output cd_pkg::node_hdr_t    new_hdr_a,
  output cd_pkg::node_hdr_t    new_hdr_b,
  input  logic                 take,
  // current pair, to the pipeline
  output logic [K-1:0][DW-1:0] cur_a,
  output logic [K-1:0][DW-1:0] cur_b,
  // triangle data, to the triangle unit
  output logic                 tri_valid,
  output logic [63:0]          tri_data,
  output logic                 tri_sel,
  output logic                 tri_last,
  output logic [24:0]          tri_addr_a,
  output logic [24:0]          tri_addr_b,
  // nothing fetched, nothing buffered
  output logic                 idle
);
  localparam int unsigned NCW = cd_pkg::coef_words(K, DW);
  localparam int unsigned BW  = NCW * 64;

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_RECV} state_t;
  state_t      state;
  logic        is_tri;      // job being fetched is a triangle pair
  logic        second;      // fetching the B half of the job
  logic [7:0]  left;        // words still to receive in this burst
  logic [7:0]  len;
  logic        hdr_word;    // next word is a node header

  logic [BW-1:0] abuf, bbuf;

  assign len           = is_tri ? 8'(TRI_WORDS) : 8'(NCW + 1);
  assign job_ready     = (state == S_IDLE) && (!new_valid || job.is_tri);
  assign mem_req_valid = (state == S_REQ);
  assign mem_req_addr  = second ? (is_tri ? tri_addr_b : new_addr_b)
                                : (is_tri ? tri_addr_a : new_addr_a);
  assign mem_req_len   = len;
  assign idle          = (state == S_IDLE) && !new_valid;

  assign tri_valid = (state == S_RECV) && is_tri && mem_rd_valid;
  assign tri_data  = mem_rd_data;
  assign tri_sel   = second;
  assign tri_last  = second && (left == 8'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      new_valid <= 1'b0;
      is_tri    <= 1'b0;
      second    <= 1'b0;
      left      <= '0;
      hdr_word  <= 1'b0;
    end else begin
      if (take) new_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (job_valid && job_ready) begin
          is_tri <= job.is_tri;
          second <= 1'b0;
          state  <= S_REQ;
        end
        S_REQ: if (mem_req_ready) begin
          left     <= len;
          hdr_word <= !is_tri;
          state    <= S_RECV;
        end
        S_RECV: if (mem_rd_valid) begin
          hdr_word <= 1'b0;
          left     <= left - 8'd1;
          if (left == 8'd1) begin
            if (!second) begin
              second <= 1'b1;
              state  <= S_REQ;
            end else begin
              state <= S_IDLE;
              if (!is_tri) new_valid <= 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Addresses, headers and coefficient buffers (no reset needed: qualified
  // by the state machine and new_valid).
  always_ff @(posedge clk) begin
    if (state == S_IDLE && job_valid && job_ready) begin
      if (job.is_tri) begin
        tri_addr_a <= job.addr_a;
        tri_addr_b <= job.addr_b;
      end else begin
        new_addr_a <= job.addr_a;
        new_addr_b <= job.addr_b;
      end
    end
    if (state == S_RECV && mem_rd_valid && !is_tri) begin
      if (hdr_word) begin
        if (second) new_hdr_b <= cd_pkg::node_hdr_t'(mem_rd_data);
        else        new_hdr_a <= cd_pkg::node_hdr_t'(mem_rd_data);
      end else begin
        if (second) bbuf <= {mem_rd_data, bbuf[BW-1:64]};
        else        abuf <= {mem_rd_data, abuf[BW-1:64]};
      end
    end
    if (take) begin
      for (int i = 0; i < K; i++) begin
        cur_a[i] <= abuf[i*DW +: DW];
        cur_b[i] <= bbuf[i*DW +: DW];
      end
    end
  end

`ifndef SYNTHESIS
  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n) take |-> new_valid)
    else $error("getdata: take without a prefetched pair");
`endif
endmodule
