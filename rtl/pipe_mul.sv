// pipe_mul: signed multiplier with a configurable number of register stages.
//
// The product of the registered operands is formed and then passed through
// STAGES registers, so the result appears STAGES clocks after the operands.
// On an FPGA with 18-bit hard multipliers a retiming tool spreads the partial
// products of a wide multiplication over these registers; that is how the
// 35-bit products of the DOP pipeline get their two extra stages. How the
// product is split into partial products is left to synthesis (a design
// choice, not specified by the document).
module pipe_mul #(
  parameter int unsigned AW     = 35,
  parameter int unsigned BW     = 35,
  parameter int unsigned STAGES = 1
) (
  input  logic                        clk,
  input  logic signed [AW-1:0]        a,
  input  logic signed [BW-1:0]        b,
  output logic signed [AW+BW-1:0]     p
);
  logic signed [AW+BW-1:0] pr [STAGES];

  always_ff @(posedge clk) begin
    pr[0] <= a * b;
    for (int s = 1; s < STAGES; s++) pr[s] <= pr[s-1];
  end

  assign p = pr[STAGES-1];
endmodule
