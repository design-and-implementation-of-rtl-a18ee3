// tb_fp16_add - self-checking testbench of the registered binary16 adder.
//
// Applies directed cases (zeros, cancellation, carry-out, rounding ties,
// infinities, NaN, overflow and flush-to-zero) and many random operand pairs of
// close and distant exponents, in both add and subtract mode. One operation is
// applied per clock; each result is checked one clock later against the
// double-precision reference of fp16_ref_pkg, which also checks the one-cycle
// latency. A watchdog ends the run if it hangs.
module tb_fp16_add;
  import fp16_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] a = '0, b = '0;
  logic        sub = 1'b0;
  logic [15:0] y;
  int          checks = 0, failures = 0;

  fp16_add dut (.clk, .rst_n, .a, .b, .sub, .y);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] ta, input logic [15:0] tb_, input logic ts,
                       input logic [15:0] exp_v);
    a = ta; b = tb_; sub = ts;
    @(posedge clk); #1;
    checks++;
    if (!same(y, exp_v)) begin
      failures++;
      if (failures < 10)
        $display("FAIL add a=%h b=%h sub=%0d: got %h expected %h", ta, tb_, ts, y, exp_v);
    end
  endtask

  task automatic rnd(input logic [15:0] ta, input logic [15:0] tb_, input logic ts);
    logic [15:0] bb;
    bb = ts ? {~tb_[15], tb_[14:0]} : tb_;
    apply(ta, tb_, ts, ref_add(ta, bb));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Directed cases, expected values worked out by hand.
    apply(16'h3C00, 16'h3C00, 1'b0, 16'h4000);  // 1 + 1 = 2
    apply(16'h4100, 16'hC100, 1'b0, 16'h0000);  // 2.5 - 2.5 = +0
    apply(16'h3E00, 16'h3D00, 1'b1, 16'h3400);  // 1.5 - 1.25 = 0.25
    apply(16'hC100, 16'h3F00, 1'b0, 16'hBA00);  // -2.5 + 1.75 = -0.75
    apply(16'h3D00, 16'h4100, 1'b0, 16'h4380);  // 1.25 + 2.5 = 3.75
    apply(16'h3C00, 16'h1000, 1'b0, 16'h3C00);  // 1 + 2^-11: tie, to even
    apply(16'h3C01, 16'h1000, 1'b0, 16'h3C02);  // tie rounds up to even
    apply(16'h7BFF, 16'h7BFF, 1'b0, 16'h7C00);  // overflow to +inf
    apply(16'h7C00, 16'hFC00, 1'b0, 16'h7E00);  // inf - inf = NaN
    apply(16'h7C00, 16'h3C00, 1'b1, 16'h7C00);  // inf - 1 = inf
    apply(16'h3C00, 16'h7E00, 1'b0, 16'h7E00);  // NaN propagates
    apply(16'h0401, 16'h0400, 1'b1, 16'h0000);  // 2^-24-ish difference flushes
    apply(16'h0000, 16'hB800, 1'b0, 16'hB800);  // 0 + -0.5
    apply(16'h3800, 16'h0000, 1'b1, 16'h3800);  // 0.5 - 0
    apply(16'h0000, 16'h3800, 1'b1, 16'hB800);  // 0 - 0.5
    apply(16'h0200, 16'h3800, 1'b0, 16'h3800);  // subnormal reads as zero
    // Random: near exponents (cancellation) and spread exponents.
    for (int i = 0; i < 20000; i++) begin
      rnd(rand_fp16(10, 20), rand_fp16(10, 20), 1'($urandom));
      rnd(rand_fp16(1, 30), rand_fp16(1, 30), 1'($urandom));
    end
    for (int i = 0; i < 4000; i++) begin
      logic [15:0] x;
      x = rand_fp16(5, 25);
      // x - (x +/- 1 ulp) and similar heavy cancellation
      rnd(x, {x[15], x[14:0] + 15'(int'($urandom_range(3)))}, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
