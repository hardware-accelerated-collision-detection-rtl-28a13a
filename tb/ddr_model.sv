// ddr_model: behavioural stand-in for the board's DDR memory (64-bit words).
//
// Accepts one read request at a time (req_valid/req_ready, word address,
// burst length), waits LATENCY clocks and then returns the words in order on
// rd_valid/rd_data; with GAPS set it inserts random idle clocks inside the
// burst. Testbenches fill mem[] directly.
module ddr_model #(
  parameter int unsigned WORDS   = 4096,
  parameter int unsigned LATENCY = 6,
  parameter bit          GAPS    = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  input  logic [24:0] req_addr,
  input  logic [7:0]  req_len,
  output logic        req_ready,
  output logic        rd_valid,
  output logic [63:0] rd_data
);
  logic [63:0] mem [WORDS];
  logic        busy;
  int          wait_cnt, left, addr;
  int          n_req = 0;

  assign req_ready = !busy;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else begin
      rd_valid <= 1'b0;
      if (!busy) begin
        if (req_valid) begin
          busy     <= 1'b1;
          wait_cnt <= LATENCY;
          left     <= int'(req_len);
          addr     <= int'(req_addr);
          n_req    <= n_req + 1;
        end
      end else if (wait_cnt > 0) begin
        wait_cnt <= wait_cnt - 1;
      end else if (!(GAPS && $urandom_range(3) == 0)) begin
        rd_valid <= 1'b1;
        rd_data  <= mem[addr % WORDS];
        addr     <= addr + 1;
        left     <= left - 1;
        if (left == 1) busy <= 1'b0;
      end
    end
  end
endmodule
