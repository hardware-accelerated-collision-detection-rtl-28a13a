// tb_bv_stack: random pushes of zero, one or two entries and pops, compared
// with a queue model of a LIFO (push0 below push1, pop returns the old top);
// then fills the stack past its depth and checks the sticky overflow flag.
module tb_bv_stack;
  localparam int W = 51, DEPTH = 128;
  logic clk = 0, rst_n = 0;
  logic push0 = 0, push1 = 0, pop = 0, top_valid, overflow;
  logic [W-1:0] push0_data = '0, push1_data = '0, top;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int n_pop = 0, n_push2 = 0, n_both = 0, maxdepth = 0;

  bv_stack #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (top_valid !== (model.size() != 0) || count != model.size() ||
        (model.size() != 0 && top !== model[$])) begin
      failures++;
      $display("state: valid=%0d count=%0d top=%h, model size=%0d top=%h", top_valid, count, top,
               model.size(), (model.size() != 0) ? model[$] : '0);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      check_state();
      pop   = (model.size() != 0) && ($urandom_range(2) == 0);
      push0 = ($urandom_range(3) == 0) && (model.size() < DEPTH - 2) && (t < 4500);
      push1 = ($urandom_range(3) == 0) && (model.size() < DEPTH - 2) && (t < 4500);
      push0_data = {$urandom, $urandom};
      push1_data = {$urandom, $urandom};
      @(posedge clk);
      if (pop) begin void'(model.pop_back()); n_pop++; end
      if (push0) model.push_back(push0_data);
      if (push1) model.push_back(push1_data);
      if (push0 && push1) n_push2++;
      if (pop && (push0 || push1)) n_both++;
      if (model.size() > maxdepth) maxdepth = model.size();
    end
    @(negedge clk) begin pop = 0; push0 = 0; push1 = 0; end
    check_state();
    checks++;
    if (overflow) begin failures++; $display("overflow set early"); end
    // fill beyond the depth
    while (model.size() < DEPTH) begin
      @(negedge clk) push0 = 1; push0_data = {$urandom, $urandom};
      @(posedge clk) model.push_back(push0_data);
    end
    @(negedge clk) push0 = 1; push1 = 1;
    @(negedge clk) push0 = 0; push1 = 0;
    checks++;
    if (!overflow || count != DEPTH) begin failures++; $display("overflow not flagged"); end
    checks++;
    if (n_pop < 100 || n_push2 < 100 || n_both < 100) begin
      failures++; $display("too few cases pop=%0d push2=%0d both=%0d", n_pop, n_push2, n_both);
    end
    $display("pops=%0d double pushes=%0d pop+push=%0d max depth=%0d", n_pop, n_push2, n_both, maxdepth);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
