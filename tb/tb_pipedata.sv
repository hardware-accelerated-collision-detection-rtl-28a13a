// tb_pipedata: checks that every tag leaves PipeData exactly DEPTH clocks
// after it entered, unchanged and with its valid bit, that gaps in the
// stream stay gaps, and that any_valid is high exactly while a tag is occupied.
module tb_pipedata;
  localparam int W = $bits(cd_pkg::pipe_tag_t);
  localparam int DEPTH = 7 + cd_pkg::MUL_EXTRA_DEF;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, any_valid;
  logic [W-1:0] in_tag = '0, out_tag;
  int checks = 0, failures = 0, cyc = 0;

  pipedata dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: history of the inputs seen at each clock
  logic         hv [int];
  logic [W-1:0] ht [int];
  always @(posedge clk) if (rst_n) begin
    hv[cyc] = in_valid;
    ht[cyc] = in_tag;
    if (cyc >= DEPTH) begin
      bit occupied;
      occupied = 0;
      for (int d = 1; d <= DEPTH; d++) occupied |= hv[cyc - d];
      checks++;
      if (out_valid !== hv[cyc - DEPTH] || (out_valid && out_tag !== ht[cyc - DEPTH])) begin
        failures++;
        $display("cycle %0d: out %0d/%h expected %0d/%h", cyc, out_valid, out_tag,
                 hv[cyc - DEPTH], ht[cyc - DEPTH]);
      end
      checks++;
      if (any_valid !== occupied) begin
        failures++;
        $display("cycle %0d: any_valid %0d expected %0d", cyc, any_valid, occupied);
      end
    end
    cyc++;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0) && (t < 1900) && !(t > 500 && t < 530);
      in_tag = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
