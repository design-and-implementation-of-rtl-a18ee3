// tb_gtf_unit - self-checking testbench of the resource-shared GTF computation unit.
//
// Each clock it applies random neighbour outputs, a random bu, random
// coefficients of Gabor-filter size, a random select line and a random valid
// bit. The expected result is computed with fp16_ref_pkg::ref_gtf, which
// evaluates the real or imaginary update formula in double precision with
// binary16 rounding after every operation, in the order of the tree. A
// scoreboard indexed by clock number expects each valid result in rterm (s=0)
// or iterm (s=1) exactly six clocks later, with out_valid/out_sel set, and
// checks both registers and the flags every clock, so the latency of three
// pixel clocks is checked too. The first two clocks use the operand values of
// the original design's simulation example (alphaX, not given there, is 0.25).
module tb_gtf_unit;
  import fp16_ref_pkg::*;

  localparam int LAT = 6;
  localparam int NCYC = 20000;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             in_valid = 1'b0, s = 1'b0;
  logic [3:0][15:0] yr = '0, yi = '0, coef = '0;
  logic [15:0]      bu = '0;
  logic [15:0]      rterm, iterm;
  logic             out_valid, out_sel;
  int checks = 0, failures = 0;

  logic        sb_v   [0:NCYC+LAT+2];
  logic        sb_sel [0:NCYC+LAT+2];
  logic [15:0] sb_val [0:NCYC+LAT+2];
  logic [15:0] mr, mi;
  int          n_real = 0, n_imag = 0;

  gtf_unit dut (.clk, .rst_n, .in_valid, .s, .yr, .yi, .bu, .coef,
                .rterm, .iterm, .out_valid, .out_sel);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c <= NCYC + LAT + 2; c++) sb_v[c] = 1'b0;
    mr = 16'h0; mi = 16'h0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC + LAT + 2; c++) begin
      // Drive the operands of clock c.
      if (c < 2) begin
        // Example operands: x1..x4 = -2.5, 1.75, 1.25, 2.5 (real), x5..x8 the
        // same (imaginary), betaX = alphaY = 0x39E1, betaY = 0x3BAD, b = 0x37E1 (bu with u = 1).
        yr = {16'h4100, 16'h3D00, 16'h3F00, 16'hC100};
        yi = {16'h4100, 16'h3D00, 16'h3F00, 16'hC100};
        coef = {16'h3BAD, 16'h39E1, 16'h39E1, 16'h3400};
        bu = 16'h37E1;
        s = 1'(c);
        in_valid = 1'b1;
      end else if (c < NCYC) begin
        for (int k = 0; k < 4; k++) begin
          yr[k]   = rand_fp16(8, 19);
          yi[k]   = rand_fp16(8, 19);
          coef[k] = rand_fp16(9, 13);
        end
        bu = rand_fp16(8, 19);
        s = 1'($urandom);
        in_valid = 1'($urandom_range(4) != 0);
      end else begin
        in_valid = 1'b0;
      end
      sb_v[c + LAT]   = in_valid;
      sb_sel[c + LAT] = s;
      sb_val[c + LAT] = ref_gtf(s, yr, yi, bu, coef);
      @(posedge clk);
      #1;
      // After the edge closing clock c, the outputs belong to clock c+1.
      if (sb_v[c + 1]) begin
        if (sb_sel[c + 1]) mi = sb_val[c + 1];
        else               mr = sb_val[c + 1];
      end
      checks++;
      if (!same(rterm, mr) || !same(iterm, mi) || out_valid !== sb_v[c + 1] ||
          (sb_v[c + 1] && out_sel !== sb_sel[c + 1])) begin
        failures++;
        if (failures < 10)
          $display("FAIL clock %0d: rterm=%h iterm=%h v=%0d sel=%0d expected %h %h v=%0d sel=%0d",
                   c + 1, rterm, iterm, out_valid, out_sel, mr, mi, sb_v[c + 1], sb_sel[c + 1]);
      end
      if (out_valid && !out_sel) n_real++;
      if (out_valid && out_sel) n_imag++;
      @(negedge clk);
    end
    checks++;
    if (n_real < 100 || n_imag < 100) begin
      failures++;
      $display("FAIL too few results: real=%0d imag=%0d", n_real, n_imag);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
