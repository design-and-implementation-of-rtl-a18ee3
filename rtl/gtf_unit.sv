// gtf_unit - one resource-shared CNN-based Gabor-type filter computation unit.
//
// Computes one discrete-time CNN update of the complex Gabor-type filter for a
// cell from the outputs of its four neighbours, in 16-bit floating point:
//   y_ij = b*u_ij + sum_k e^{+-j w} y_k / (4 + lambda^2)
// split into real and imaginary parts (see gtf_input_mux). A single tree
// computes the real part when the select line s is 0 and the imaginary part
// when s is 1, halving the adders and multipliers at the cost of running at
// twice the pixel clock. The tree is
//   stage 1  four registered pre-adders   s1, s2 (sums), d1, d2 (differences)
//   stage 2  four registered multipliers  ax*s1, bx*s2, ay*d1, by*d2
//   stage 3  two registered adders        ax*s1+bx*s2, ay*d1+by*d2
//   stage 4  one registered adder         sum of both
//   stage 5  one registered adder         + c0 (bu for real, 0 for imaginary)
//   stage 6  output demultiplexer         Rterm or Iterm register
// so a result reaches rterm/iterm GTF_LATENCY = 6 clocks after its operands
// (three pixel clocks), and one operation can start every clock. The select
// tag and the valid bit travel down the pipeline with the data; out_valid and
// out_sel tell which output register was written last clock.
// The coefficients are inputs: ax=cos(wx0)/(4+l^2), ay=sin(wx0)/(4+l^2),
// bx=cos(wy0)/(4+l^2), by=sin(wy0)/(4+l^2); bu = b*u with b=l^2/(4+l^2).
// The sharing, the four multipliers, the registered arithmetic, the six stages
// and the output demultiplexing follow the filter description; the split of
// the work over the stages and the order of the additions are this design's.
module gtf_unit
  import fp16_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        s,
  input  fp16_t [3:0] yr,       // x1..x4: real outputs of W, E, N, S neighbours
  input  fp16_t [3:0] yi,       // x5..x8: imaginary outputs of W, E, N, S neighbours
  input  fp16_t       bu,
  input  fp16_t [3:0] coef,     // indexed by coef_e: alphaX, alphaY, betaX, betaY
  output fp16_t       rterm,
  output fp16_t       iterm,
  output logic        out_valid,
  output logic        out_sel
);

  localparam int NSTAGE = 5;    // arithmetic stages before the demultiplexer

  fp16_t [3:0] sum_op, dif_op;
  fp16_t       c0;

  gtf_input_mux u_mux (
    .s, .yr, .yi, .bu, .sum_op, .dif_op, .c0
  );

  // Stage 1: pre-adders.
  fp16_t s1, s2, d1, d2;
  fp16_add u_add_s1 (.clk, .rst_n, .a(sum_op[0]), .b(sum_op[1]), .sub(1'b0), .y(s1));
  fp16_add u_add_s2 (.clk, .rst_n, .a(sum_op[2]), .b(sum_op[3]), .sub(1'b0), .y(s2));
  fp16_add u_add_d1 (.clk, .rst_n, .a(dif_op[0]), .b(dif_op[1]), .sub(1'b1), .y(d1));
  fp16_add u_add_d2 (.clk, .rst_n, .a(dif_op[2]), .b(dif_op[3]), .sub(1'b1), .y(d2));

  // Coefficients travel with their operands into the multiplier stage, the
  // constant term down to the last adder.
  fp16_t [3:0] coef_q;
  fp16_t       c0_q [1:NSTAGE-1];
  logic        vld_q [1:NSTAGE];
  logic        sel_q [1:NSTAGE];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      coef_q <= '0;
      for (int i = 1; i <= NSTAGE - 1; i++) c0_q[i] <= FP16_ZERO;
      for (int i = 1; i <= NSTAGE; i++) begin
        vld_q[i] <= 1'b0;
        sel_q[i] <= 1'b0;
      end
    end else begin
      coef_q   <= coef;
      c0_q[1]  <= c0;
      vld_q[1] <= in_valid;
      sel_q[1] <= s;
      for (int i = 2; i <= NSTAGE - 1; i++) c0_q[i] <= c0_q[i-1];
      for (int i = 2; i <= NSTAGE; i++) begin
        vld_q[i] <= vld_q[i-1];
        sel_q[i] <= sel_q[i-1];
      end
    end
  end

  // Stage 2: multipliers.
  fp16_t m_ax, m_bx, m_ay, m_by;
  fp16_mul u_mul_ax (.clk, .rst_n, .a(coef_q[C_AX]), .b(s1), .y(m_ax));
  fp16_mul u_mul_bx (.clk, .rst_n, .a(coef_q[C_BX]), .b(s2), .y(m_bx));
  fp16_mul u_mul_ay (.clk, .rst_n, .a(coef_q[C_AY]), .b(d1), .y(m_ay));
  fp16_mul u_mul_by (.clk, .rst_n, .a(coef_q[C_BY]), .b(d2), .y(m_by));

  // Stage 3 and 4: adder tree.
  fp16_t q_cos, q_sin, q_all;
  fp16_add u_add_cos (.clk, .rst_n, .a(m_ax),  .b(m_bx),  .sub(1'b0), .y(q_cos));
  fp16_add u_add_sin (.clk, .rst_n, .a(m_ay),  .b(m_by),  .sub(1'b0), .y(q_sin));
  fp16_add u_add_all (.clk, .rst_n, .a(q_cos), .b(q_sin), .sub(1'b0), .y(q_all));

  // Stage 5: constant term.
  fp16_t res;
  fp16_add u_add_c0 (.clk, .rst_n, .a(q_all), .b(c0_q[NSTAGE-1]), .sub(1'b0), .y(res));

  // Stage 6: demultiplex into the output registers.
  gtf_output_demux u_demux (
    .clk, .rst_n, .en(vld_q[NSTAGE]), .sel(sel_q[NSTAGE]), .d(res), .rterm, .iterm
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sel   <= 1'b0;
    end else begin
      out_valid <= vld_q[NSTAGE];
      out_sel   <= sel_q[NSTAGE];
    end
  end

endmodule
