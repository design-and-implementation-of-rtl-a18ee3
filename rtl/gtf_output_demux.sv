// gtf_output_demux - output demultiplexer of the resource-shared GTF unit.
//
// The shared tree delivers real and imaginary results on one bus, alternately.
// Each valid result (en=1) is written into the Rterm register when its select
// tag sel is 0 and into the Iterm register when sel is 1; the other register
// keeps its value. The registers are the unit's outputs, so a result appears on
// rterm/iterm one clock after it is presented. Reset clears both to +0.
// The demultiplexing into two output registers follows the filter description;
// the reset value is this design's choice.
module gtf_output_demux
  import fp16_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  sel,
  input  fp16_t d,
  output fp16_t rterm,
  output fp16_t iterm
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rterm <= FP16_ZERO;
      iterm <= FP16_ZERO;
    end else if (en) begin
      if (sel) iterm <= d;
      else     rterm <= d;
    end
  end

endmodule
