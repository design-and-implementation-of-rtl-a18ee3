// gtf_phase_ctrl - select-line sequencer of the resource-shared GTF unit.
//
// The shared tree needs two clocks per pixel: the real part (s=0) and then the
// imaginary part (s=1). This controller runs at the computation clock, twice
// the pixel clock, and toggles s every clock from reset, so s=0 marks the first
// half of each pixel period. A pixel starts when pix_valid is high while s=0
// (pix_ready); its operands must stay on the unit's inputs for that clock and
// the next. calc_valid asks the unit to compute in both halves of a started
// pixel. pix_done rises LATENCY+1 clocks after pix_start: by then the real
// result (written LATENCY clocks after the first half) and the imaginary result
// (one clock later) of the same pixel are both in the output registers.
// Running the tree at twice the pixel rate follows the filter description; how
// s is generated and the valid/ready signals are this design's choice.
module gtf_phase_ctrl #(
  parameter int LATENCY = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pix_valid,
  output logic s,
  output logic pix_ready,
  output logic pix_start,
  output logic calc_valid,
  output logic pix_done
);

  logic           started_q;
  logic [LATENCY:0] done_sr;

  assign pix_ready  = ~s;
  assign pix_start  = pix_valid & ~s;
  assign calc_valid = s ? started_q : pix_valid;
  assign pix_done   = done_sr[LATENCY];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s         <= 1'b0;
      started_q <= 1'b0;
      done_sr   <= '0;
    end else begin
      s         <= ~s;
      started_q <= pix_start;
      done_sr   <= {done_sr[LATENCY-1:0], pix_start};
    end
  end

endmodule
