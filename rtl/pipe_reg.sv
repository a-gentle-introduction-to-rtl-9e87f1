// pipe_reg: an edge-triggered pipeline register of the LC2Kx pipeline.
//
// The same part serves as IF/ID, ID/EX, EX/Mem and Mem/WB: the type
// parameter T selects which struct of lc2k_pkg it holds. At every rising
// clock edge with en high it captures d; the synchronous, active-high
// reset loads rst_val, which for the pipeline is a noop with zero fields
// (the pipeline's initial state). q is the registered value, read by the
// next stage throughout the following cycle.
//
// Edge triggering and the stage-to-stage role follow the pipeline
// description; the enable and the reset value port are this design's own.
module pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  T     rst_val,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= rst_val;
    else if (en) q <= d;
  end

endmodule
