// bv_stack: LIFO of pending tests (DOP pairs and triangle pairs).
//
// The controller schedules work in a stack rather than a queue because a
// depth-first traversal needs far less storage. Up to two entries can be
// pushed in one clock (the two child pairs of an overlapping DOP pair);
// push0 lands below push1, so the pair in push1 is popped first. The top entry
// is shown combinationally on top/top_valid and removed with pop; a pop and a
// push in the same clock are allowed (the popped entry is the old top).
// Pushing beyond DEPTH entries drops the entries and sets the sticky overflow
// flag until reset. The LIFO policy follows the document; the two-entry push,
// the depth and the overflow flag are this design's choices.
module bv_stack #(
  parameter int unsigned W     = $bits(cd_pkg::job_t),
  parameter int unsigned DEPTH = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push0,
  input  logic [W-1:0] push0_data,
  input  logic         push1,
  input  logic [W-1:0] push1_data,
  input  logic         pop,
  output logic [W-1:0] top,
  output logic         top_valid,
  output logic         overflow,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0] mem [DEPTH];
  logic [CW-1:0] sp;                     // number of valid entries

  logic          do_pop;
  logic [CW:0]   base;                   // sp after the pop
  logic [CW:0]   nxt;
  assign do_pop    = pop && (sp != '0);
  assign base      = {1'b0, sp} - (do_pop ? 1 : 0);
  assign nxt       = base + (push0 ? 1 : 0) + (push1 ? 1 : 0);
  assign top_valid = (sp != '0);
  assign top       = mem[(sp == '0) ? '0 : sp - 1'b1];
  assign count     = sp;

  always_ff @(posedge clk) begin
    if (push0 && base < DEPTH)
      mem[base[CW-1:0]] <= push0_data;
    if (push1) begin
      if (push0 && base + 1 < DEPTH)  mem[CW'(base + 1)] <= push1_data;
      else if (!push0 && base < DEPTH) mem[base[CW-1:0]] <= push1_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp       <= '0;
      overflow <= 1'b0;
    end else begin
      if (nxt > DEPTH) begin
        sp       <= CW'(DEPTH);
        overflow <= 1'b1;
      end else begin
        sp <= nxt[CW-1:0];
      end
    end
  end

`ifndef SYNTHESIS
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> top_valid)
    else $error("bv_stack: pop of an empty stack");
`endif
endmodule
