// gtf_top - Gabor-type filter processor: one resource-shared computation unit
// with its select-line sequencer.
//
// Each pixel period of two clocks, the processor takes the real and imaginary
// outputs of a cell's four neighbours (W, E, N, S), the cell's weighted input
// bu = b*u and the four coupling coefficients, and returns the cell's new
// complex output y = b*u + sum_k e^{+-jw} y_k / (4+lambda^2) on rterm/iterm.
// Repeating this over an image, with the new outputs fed back as neighbour
// values, is the forward-Euler (discrete-time CNN) iteration whose fixed point
// is the Gabor-type filtered image.
//
// Interface: clk is the computation clock, twice the pixel clock. A pixel
// starts in a clock where pix_ready (s=0) and pix_valid are high, and its
// inputs must be held for that clock and the next. pix_done is high for one
// clock, seven clocks after the pixel started, when rterm and iterm both hold
// that pixel's result; they keep it until the next pixel's results arrive
// (rterm one clock before iterm). Pixels may follow each other back to back.
module gtf_top
  import fp16_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_valid,
  output logic        pix_ready,
  input  fp16_t [3:0] yr,
  input  fp16_t [3:0] yi,
  input  fp16_t       bu,
  input  fp16_t [3:0] coef,
  output logic        s,
  output fp16_t       rterm,
  output fp16_t       iterm,
  output logic        pix_done
);

  logic calc_valid, pix_start;
  logic out_valid, out_sel;

  gtf_phase_ctrl #(.LATENCY(GTF_LATENCY)) u_ctrl (
    .clk, .rst_n, .pix_valid, .s, .pix_ready, .pix_start, .calc_valid, .pix_done
  );

  gtf_unit u_unit (
    .clk, .rst_n, .in_valid(calc_valid), .s, .yr, .yi, .bu, .coef,
    .rterm, .iterm, .out_valid, .out_sel
  );

  // The imaginary result of a pixel is written in the clock before pix_done.
  a_done_after_imag: assert property (@(posedge clk) disable iff (!rst_n)
    pix_done |-> out_valid && out_sel && $past(out_valid && !out_sel))
    else $error("pix_done without the imaginary result");

  // A pixel only starts in the real phase.
  a_start_in_real_phase: assert property (@(posedge clk) disable iff (!rst_n)
    pix_start |-> !s)
    else $error("pixel started in the imaginary phase");

endmodule
