// tb_gtf_phase_ctrl - self-checking testbench of the select-line sequencer.
//
// Checks that s starts at 0 after reset and toggles every clock, that
// pix_ready equals ~s, that a pixel is accepted only in an s=0 clock with
// pix_valid, that calc_valid covers exactly both halves of an accepted pixel,
// and that pix_done follows each accepted pixel by exactly LATENCY+1 clocks.
// pix_valid is driven at random, including in s=1 clocks where it must be
// ignored. Watchdog included.
module tb_gtf_phase_ctrl;
  localparam int LAT = 6;
  logic clk = 1'b0, rst_n = 1'b0, pix_valid = 1'b0;
  logic s, pix_ready, pix_start, calc_valid, pix_done;
  int   checks = 0, failures = 0;
  logic exp_s;
  logic acc_hist [0:LAT+1];
  logic prev_start;
  int   starts = 0, dones = 0;

  gtf_phase_ctrl #(.LATENCY(LAT)) dut (.clk, .rst_n, .pix_valid, .s, .pix_ready,
                                       .pix_start, .calc_valid, .pix_done);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic got, input logic exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp_v);
    end
  endtask

  initial begin
    for (int k = 0; k <= LAT + 1; k++) acc_hist[k] = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    exp_s = 1'b0;
    prev_start = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      // drive at negedge, check combinational outputs before the edge
      pix_valid = 1'($urandom_range(3) != 0);
      #1;
      chk(s, exp_s, "s");
      chk(pix_ready, ~exp_s, "pix_ready");
      chk(pix_start, pix_valid & ~exp_s, "pix_start");
      chk(calc_valid, exp_s ? prev_start : pix_valid, "calc_valid");
      // pix_done now reflects the pixel started LAT+1 clocks ago
      chk(pix_done, acc_hist[LAT], "pix_done");
      if (pix_start) starts++;
      if (pix_done) dones++;
      for (int k = LAT + 1; k > 0; k--) acc_hist[k] = acc_hist[k-1];
      acc_hist[0] = pix_valid & ~exp_s;
      prev_start  = pix_valid & ~exp_s;
      exp_s = ~exp_s;
      @(negedge clk);
    end
    checks++;
    if (starts < 100 || dones < 100) begin
      failures++;
      $display("FAIL too few pixels: starts=%0d dones=%0d", starts, dones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
