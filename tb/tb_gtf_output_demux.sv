// tb_gtf_output_demux - self-checking testbench of the Rterm/Iterm demultiplexer.
//
// Drives random data with random enable and select each clock and keeps a
// model of both output registers: a valid word goes to rterm (sel=0) or iterm
// (sel=1) one clock later, and the other register holds. Checks both outputs
// every clock, including the reset value. Watchdog included.
module tb_gtf_output_demux;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        en = 1'b0, sel = 1'b0;
  logic [15:0] d = '0;
  logic [15:0] rterm, iterm;
  logic [15:0] mr, mi;
  int checks = 0, failures = 0;

  gtf_output_demux dut (.clk, .rst_n, .en, .sel, .d, .rterm, .iterm);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1; d = 16'h1234;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (rterm !== 16'h0 || iterm !== 16'h0) begin
      failures++;
      $display("FAIL reset: rterm=%h iterm=%h", rterm, iterm);
    end
    mr = 16'h0; mi = 16'h0;
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en  = 1'($urandom_range(3) != 0);
      sel = 1'($urandom);
      d   = 16'($urandom);
      @(posedge clk);
      if (en) begin
        if (sel) mi = d;
        else     mr = d;
      end
      #1;
      checks++;
      if (rterm !== mr || iterm !== mi) begin
        failures++;
        if (failures < 10)
          $display("FAIL: rterm=%h iterm=%h expected %h %h", rterm, iterm, mr, mi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
