// pipedata: bookkeeping shift register that runs beside the DOP pipeline.
//
// Every axis test that enters the pipeline carries a tag (the addresses and
// headers of the two DOPs, a pair sequence number and whether it is the last
// axis test issued for the pair). PipeData holds one tag per pipeline stage
// and shifts every clock, so a tag leaves exactly DEPTH clocks after it came
// in, together with the result of its axis test. Only the stage valid bits
// are reset; tag contents are don't-care while their valid bit is low.
// The shift-register structure and its content follow the document; the
// exact tag fields (sequence number, node headers) are this design's choice.
module pipedata #(
  parameter int unsigned W     = $bits(cd_pkg::pipe_tag_t),
  parameter int unsigned DEPTH = 7 + cd_pkg::MUL_EXTRA_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_tag,
  output logic         out_valid,
  output logic [W-1:0] out_tag,
  output logic         any_valid   // some stage holds a test (pipeline not empty)
);
  logic [DEPTH-1:0]         vld;
  logic [DEPTH-1:0][W-1:0]  tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[DEPTH-2:0], in_valid};
  end

  always_ff @(posedge clk) tag <= {tag[DEPTH-2:0], in_tag};

  assign out_valid = vld[DEPTH-1];
  assign out_tag   = tag[DEPTH-1];
  assign any_valid = |vld;
endmodule
