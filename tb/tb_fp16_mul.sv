// tb_fp16_mul - self-checking testbench of the registered binary16 multiplier.
//
// Directed cases (exact products, rounding, overflow, flush-to-zero, zeros,
// infinities, NaN) and random operands over the whole normal range are applied
// one per clock; each product is checked one clock later against the
// double-precision reference of fp16_ref_pkg, which also checks the one-cycle
// latency. A watchdog ends the run if it hangs.
module tb_fp16_mul;
  import fp16_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] a = '0, b = '0;
  logic [15:0] y;
  int          checks = 0, failures = 0;

  fp16_mul dut (.clk, .rst_n, .a, .b, .y);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] ta, input logic [15:0] tb_, input logic [15:0] exp_v);
    a = ta; b = tb_;
    @(posedge clk); #1;
    checks++;
    if (!same(y, exp_v)) begin
      failures++;
      if (failures < 10)
        $display("FAIL mul a=%h b=%h: got %h expected %h", ta, tb_, y, exp_v);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    apply(16'h4100, 16'hC100, 16'hC640);  // 2.5 * -2.5 = -6.25
    apply(16'h3F00, 16'h3D00, 16'h4060);  // 1.75*1.25 = 2.1875
    apply(16'h3C00, 16'h3C00, 16'h3C00);  // 1*1
    apply(16'h3C01, 16'h3C01, 16'h3C02);  // (1+2^-10)^2 rounds to 1+2^-9
    apply(16'h7800, 16'h4400, 16'h7C00);  // 32768*4 overflows
    apply(16'h0400, 16'h3800, 16'h0000);  // 2^-14 * 0.5 flushes
    apply(16'h0000, 16'hC500, 16'h8000);  // 0 * -5 = -0
    apply(16'h7C00, 16'h0000, 16'h7E00);  // inf * 0 = NaN
    apply(16'hFC00, 16'h4000, 16'hFC00);  // -inf * 2
    apply(16'h7E00, 16'h3C00, 16'h7E00);  // NaN
    for (int i = 0; i < 40000; i++) begin
      logic [15:0] x, z;
      x = rand_fp16(1, 30);
      z = rand_fp16(1, 30);
      apply(x, z, ref_mul(x, z));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
