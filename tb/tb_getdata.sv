// tb_getdata: GetData against the behavioural DDR model.
//
// Memory holds 32 random BV nodes (header + packed coefficients, packed here
// bit by bit from the coefficient values) and 32 random triangle records.
// A random mix of DOP-pair and triangle-pair jobs is offered. Checked: the
// prefetched pair's addresses and headers on new_valid; after take, the 2x24
// coefficients on cur_a/cur_b; every triangle word, its A/B select, the last
// flag and the triangle addresses; that the next DOP pair is fetched while
// the current one is still held (prefetch during computation), and that idle
// is only high with nothing fetched or buffered.
module tb_getdata;
  import cd_pkg::*;
  localparam int K = K_DEF, DW = DW_DEF, TRW = TRI_WORDS_DEF;
  localparam int NCW = (K * DW + 63) / 64;
  localparam int NNODE = 32, NODE_BASE = 0, NODE_STRIDE = 16, TRI_BASE = 1024, TRI_STRIDE = 8;

  logic clk = 0, rst_n = 0;
  logic job_valid = 0, job_ready;
  job_t job;
  logic mem_req_valid, mem_req_ready, mem_rd_valid;
  logic [24:0] mem_req_addr;
  logic [7:0] mem_req_len;
  logic [63:0] mem_rd_data;
  logic new_valid, take = 0;
  logic [24:0] new_addr_a, new_addr_b;
  node_hdr_t new_hdr_a, new_hdr_b;
  logic [K-1:0][DW-1:0] cur_a, cur_b;
  logic tri_valid, tri_sel, tri_last, idle;
  logic [63:0] tri_data;
  logic [24:0] tri_addr_a, tri_addr_b;

  int checks = 0, failures = 0;
  int n_dop = 0, n_tri = 0, n_prefetch = 0;

  getdata dut (.*);
  ddr_model #(.WORDS(2048), .LATENCY(5)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_addr(mem_req_addr), .req_len(mem_req_len),
    .req_ready(mem_req_ready), .rd_valid(mem_rd_valid), .rd_data(mem_rd_data));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] coef [NNODE][K];
  logic [63:0]   hdrw [NNODE];

  task automatic fill_memory();
    for (int n = 0; n < NNODE; n++) begin
      automatic logic [NCW*64-1:0] stream = '0;
      hdrw[n] = {$urandom, $urandom};
      mem.mem[NODE_BASE + n * NODE_STRIDE] = hdrw[n];
      for (int i = 0; i < K; i++) begin
        coef[n][i] = DW'({$urandom, $urandom});
        for (int t = 0; t < DW; t++) stream[i * DW + t] = coef[n][i][t];
      end
      for (int w = 0; w < NCW; w++) mem.mem[NODE_BASE + n * NODE_STRIDE + 1 + w] = stream[w*64 +: 64];
    end
    for (int t = 0; t < NNODE * TRI_STRIDE; t++) mem.mem[TRI_BASE + t] = {$urandom, $urandom};
  endtask

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  // triangle stream monitor
  int tri_exp_addr[$];   // expected word addresses in order
  int tri_last_idx[$];
  always @(posedge clk) if (rst_n && tri_valid) begin
    int ad;
    if (tri_exp_addr.size() == 0) check(0, "unexpected triangle word");
    else begin
      ad = tri_exp_addr.pop_front();
      check(tri_data === mem.mem[ad], "triangle word");
      check(tri_sel === (tri_exp_addr.size() < TRW), "triangle select");
      check(tri_last === (tri_exp_addr.size() == 0), "triangle last flag");
    end
  end

  // idle must be low whenever something is buffered
  always @(posedge clk) if (rst_n && idle) check(!new_valid, "idle with a buffered pair");

  int pend_a = -1, pend_b = -1;   // node numbers of the pair in the new buffers

  initial begin
    job = '0;
    fill_memory();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int j = 0; j < 200; j++) begin
      automatic bit is_tri = ($urandom_range(3) == 0);
      automatic int na = $urandom_range(NNODE - 1), nb = $urandom_range(NNODE - 1);
      @(negedge clk);
      job_valid = 1;
      job.is_tri = is_tri;
      job.addr_a = is_tri ? 25'(TRI_BASE + na * TRI_STRIDE) : 25'(NODE_BASE + na * NODE_STRIDE);
      job.addr_b = is_tri ? 25'(TRI_BASE + nb * TRI_STRIDE) : 25'(NODE_BASE + nb * NODE_STRIDE);
      #1;
      // a pair already buffered must be taken before a DOP job is accepted
      while (!job_ready) begin
        if (new_valid && !is_tri && $urandom_range(1)) begin
          take = 1;
          @(negedge clk);
          take = 0;
          #1;
          for (int i = 0; i < K; i++) begin
            check(cur_a[i] === coef[pend_a][i], $sformatf("cur_a coefficient %0d: %h vs %h (node %0d)", i, cur_a[i], coef[pend_a][i], pend_a));
            check(cur_b[i] === coef[pend_b][i], "cur_b coefficient");
          end
        end else begin
          @(negedge clk);
          #1;
        end
      end
      if (is_tri) begin
        for (int w = 0; w < TRW; w++) tri_exp_addr.push_back(TRI_BASE + na * TRI_STRIDE + w);
        for (int w = 0; w < TRW; w++) tri_exp_addr.push_back(TRI_BASE + nb * TRI_STRIDE + w);
        n_tri++;
      end else begin
        n_dop++;
        if (pend_a >= 0) n_prefetch++;  // cur_* still holds the previous pair
      end
      @(posedge clk);
      #1 job_valid = 0;
      if (is_tri) begin
        @(negedge clk);
        check(tri_addr_a == 25'(TRI_BASE + na * TRI_STRIDE) && tri_addr_b == 25'(TRI_BASE + nb * TRI_STRIDE),
              "triangle addresses");
        wait (idle || (new_valid && dut.state == dut.S_IDLE));
        @(negedge clk);
        check(tri_exp_addr.size() == 0, "triangle words missing");
      end else begin
        wait (new_valid);
        @(negedge clk);
        check(new_addr_a == 25'(NODE_BASE + na * NODE_STRIDE) && new_addr_b == 25'(NODE_BASE + nb * NODE_STRIDE),
              "new pair addresses");
        check(new_hdr_a === node_hdr_t'(hdrw[na]) && new_hdr_b === node_hdr_t'(hdrw[nb]), "new pair headers");
        pend_a = na; pend_b = nb;
      end
    end
    if (new_valid) begin
      @(negedge clk) take = 1;
      @(negedge clk) take = 0;
      for (int i = 0; i < K; i++) check(cur_a[i] === coef[pend_a][i] && cur_b[i] === coef[pend_b][i], "final cur");
    end
    repeat (3) @(negedge clk);
    check(idle, "idle at the end");
    check(n_dop > 50 && n_tri > 20 && n_prefetch > 20, "job mix");
    $display("dop jobs=%0d tri jobs=%0d", n_dop, n_tri);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
