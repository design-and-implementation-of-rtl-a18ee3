// tb_gtf_input_mux - self-checking testbench of the GTF operand multiplexer.
//
// Drives random neighbour values with s=0 and s=1 and checks every output
// against the real and imaginary update formulas written out term by term:
// s=0 sums (RW,RE),(RN,RS), differences (IE,IW),(IS,IN), constant bu;
// s=1 sums (IW,IE),(IN,IS), differences (RW,RE),(RN,RS), constant 0.
// Combinational block: checked 1 ns after each change. Watchdog included.
module tb_gtf_input_mux;
  logic             s = 1'b0;
  logic [3:0][15:0] yr = '0, yi = '0;
  logic [15:0]      bu = '0;
  logic [3:0][15:0] sum_op, dif_op;
  logic [15:0]      c0;
  int checks = 0, failures = 0;

  gtf_input_mux dut (.s, .yr, .yi, .bu, .sum_op, .dif_op, .c0);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [15:0] got, input logic [15:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s s=%0d: got %h expected %h", what, s, got, exp_v);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      // W=0, E=1, N=2, S=3
      for (int k = 0; k < 4; k++) begin
        yr[k] = 16'($urandom);
        yi[k] = 16'($urandom);
      end
      bu = 16'($urandom);
      s  = 1'(i);
      #1;
      if (!s) begin
        chk(sum_op[0], yr[0], "s1a"); chk(sum_op[1], yr[1], "s1b");
        chk(sum_op[2], yr[2], "s2a"); chk(sum_op[3], yr[3], "s2b");
        chk(dif_op[0], yi[1], "d1a"); chk(dif_op[1], yi[0], "d1b");
        chk(dif_op[2], yi[3], "d2a"); chk(dif_op[3], yi[2], "d2b");
        chk(c0, bu, "c0");
      end else begin
        chk(sum_op[0], yi[0], "s1a"); chk(sum_op[1], yi[1], "s1b");
        chk(sum_op[2], yi[2], "s2a"); chk(sum_op[3], yi[3], "s2b");
        chk(dif_op[0], yr[0], "d1a"); chk(dif_op[1], yr[1], "d1b");
        chk(dif_op[2], yr[2], "d2a"); chk(dif_op[3], yr[3], "d2b");
        chk(c0, 16'h0000, "c0");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
