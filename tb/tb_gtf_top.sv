// tb_gtf_top - end-to-end testbench: Gabor-type filtering of a small image.
//
// The testbench holds an N x N image u and the complex filter state y (zero
// outside the image) and runs ITER forward-Euler (Jacobi) iterations of the
// discrete-time CNN through the processor: for every pixel in raster order it
// presents the four neighbour outputs of the previous iteration, bu = b*u and
// the coefficients
//   ax = cos(wx0)/(4+l^2), ay = sin(wx0)/(4+l^2),
//   bx = cos(wy0)/(4+l^2), by = sin(wy0)/(4+l^2), b = l^2/(4+l^2)
// and collects rterm/iterm at pix_done. Pixels stream back to back, with random
// idle pixel periods in between.
// Checks:
//  - every result, bit-exact, against fp16_ref_pkg::ref_gtf on the same inputs;
//  - pix_done exactly 7 clocks after the pixel started (rterm 6, iterm 7);
//  - after the last iteration, the filtered image against the same iteration
//    run in double precision (within binary16 accuracy), and its convergence:
//    the last iteration changes the state by far less than the first.
// Mechanisms counted, each must occur: real-phase and imaginary-phase
// computations of the shared tree, back-to-back pixels, idle periods, pixels
// whose bu is non-zero (bu used by the real phase, replaced by zero in the
// imaginary phase). The processor has no size parameters, so this runs the
// design as built.
module tb_gtf_top;
  import fp16_ref_pkg::*;

  localparam int  N    = 12;
  localparam int  ITER = 30;
  localparam real PI   = 3.14159265358979;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             pix_valid = 1'b0;
  logic             pix_ready, s, pix_done;
  logic [3:0][15:0] yr = '0, yi = '0, coef = '0;
  logic [15:0]      bu = '0;
  logic [15:0]      rterm, iterm;

  int checks = 0, failures = 0;

  // filter state: binary16 (as computed by the processor) and double reference
  logic [15:0] hr [0:N-1][0:N-1], hi [0:N-1][0:N-1];
  logic [15:0] nr [0:N-1][0:N-1], ni [0:N-1][0:N-1];
  real         dr [0:N-1][0:N-1], di [0:N-1][0:N-1];
  real         er [0:N-1][0:N-1], ei [0:N-1][0:N-1];
  logic [15:0] bu_h [0:N-1][0:N-1];
  real         u [0:N-1][0:N-1];

  // results expected, in pixel order
  typedef struct {
    int          x, y;
    logic [15:0] re, im;
    longint      t_start;
  } pend_t;
  pend_t  pend[$];
  longint cyc = 0;

  int n_real = 0, n_imag = 0, n_b2b = 0, n_idle = 0, n_bu = 0, n_done = 0;
  logic [3:0][15:0] cf;
  real lam, wx, wy, den, b;

  gtf_top dut (.clk, .rst_n, .pix_valid, .pix_ready, .yr, .yi, .bu, .coef, .s,
               .rterm, .iterm, .pix_done);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clock counter and phase monitors
  // Phases issued to the shared tree: a real phase in an s=0 clock that starts
  // a pixel, an imaginary phase in the s=1 clock that follows it.
  logic started_prev = 1'b0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (!s && pix_valid) n_real++;
      if (s && started_prev) n_imag++;
      started_prev <= !s && pix_valid;
    end
  end

  // result collector
  always @(posedge clk) begin
    #1;
    if (rst_n && pix_done) begin
      pend_t p;
      n_done++;
      checks++;
      if (pend.size() == 0) begin
        failures++;
        if (failures < 10) $display("FAIL pix_done with no pixel pending");
      end else begin
        p = pend.pop_front();
        if (!same(rterm, p.re) || !same(iterm, p.im) || (cyc - p.t_start) != 7) begin
          failures++;
          if (failures < 10)
            $display("FAIL pixel (%0d,%0d): got %h %h after %0d clocks, expected %h %h after 7",
                     p.x, p.y, rterm, iterm, cyc - p.t_start, p.re, p.im);
        end
        nr[p.y][p.x] = rterm;
        ni[p.y][p.x] = iterm;
      end
    end
  end

  function automatic logic [15:0] hget(input logic [15:0] a [0:N-1][0:N-1], input int x, input int y);
    if (x < 0 || y < 0 || x >= N || y >= N) return 16'h0000;
    return a[y][x];
  endfunction

  function automatic real dget(input real a [0:N-1][0:N-1], input int x, input int y);
    if (x < 0 || y < 0 || x >= N || y >= N) return 0.0;
    return a[y][x];
  endfunction

  initial begin
    real max_err, max_mag, first_delta, last_delta, delta;
    logic last_valid;

    // Filter: lambda = 1, centre frequency pi/4 along x and pi/8 along y.
    lam = 1.0; wx = PI / 4.0; wy = PI / 8.0;
    den = 4.0 + lam * lam;
    b   = lam * lam / den;
    cf[0] = to_fp16($cos(wx) / den);
    cf[1] = to_fp16($sin(wx) / den);
    cf[2] = to_fp16($cos(wy) / den);
    cf[3] = to_fp16($sin(wy) / den);
    // Input: a vertical bar and an impulse.
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        u[y][x] = (x == N / 3) ? 4.0 : ((x == 2 * N / 3 && y == N / 2) ? -8.0 : 0.0);
        bu_h[y][x] = to_fp16(b * u[y][x]);
        hr[y][x] = 16'h0; hi[y][x] = 16'h0;
        dr[y][x] = 0.0;   di[y][x] = 0.0;
      end

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    last_valid = 1'b0;
    first_delta = 0.0;
    last_delta = 0.0;

    for (int it = 0; it < ITER; it++) begin
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++) begin
          pend_t p;
          // random idle pixel period
          while ($urandom_range(7) == 0 || pix_ready !== 1'b1) begin
            if (pix_ready) begin
              n_idle++;
              last_valid = 1'b0;
            end
            pix_valid = 1'b0;
            @(negedge clk);
          end
          yr   = {hget(hr, x, y + 1), hget(hr, x, y - 1), hget(hr, x + 1, y), hget(hr, x - 1, y)};
          yi   = {hget(hi, x, y + 1), hget(hi, x, y - 1), hget(hi, x + 1, y), hget(hi, x - 1, y)};
          bu   = bu_h[y][x];
          coef = cf;
          if (bu[14:0] != 0) n_bu++;
          if (last_valid) n_b2b++;
          p.x = x; p.y = y;
          p.re = ref_gtf(1'b0, yr, yi, bu, coef);
          p.im = ref_gtf(1'b1, yr, yi, bu, coef);
          p.t_start = cyc;
          pend.push_back(p);
          pix_valid = 1'b1;
          last_valid = 1'b1;
          @(negedge clk);   // s = 1: imaginary phase, inputs held
          @(negedge clk);
          pix_valid = 1'b0;
        end
      // drain, then take the new state
      pix_valid = 1'b0;
      last_valid = 1'b0;
      while (pend.size() != 0) @(negedge clk);
      // double-precision reference of the same iteration
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++) begin
          er[y][x] = b * u[y][x]
                   + $cos(wx) / den * (dget(dr, x - 1, y) + dget(dr, x + 1, y))
                   + $cos(wy) / den * (dget(dr, x, y - 1) + dget(dr, x, y + 1))
                   + $sin(wx) / den * (dget(di, x + 1, y) - dget(di, x - 1, y))
                   + $sin(wy) / den * (dget(di, x, y + 1) - dget(di, x, y - 1));
          ei[y][x] = $cos(wx) / den * (dget(di, x - 1, y) + dget(di, x + 1, y))
                   + $cos(wy) / den * (dget(di, x, y - 1) + dget(di, x, y + 1))
                   + $sin(wx) / den * (dget(dr, x - 1, y) - dget(dr, x + 1, y))
                   + $sin(wy) / den * (dget(dr, x, y - 1) - dget(dr, x, y + 1));
        end
      delta = 0.0;
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++) begin
          real d1;
          d1 = to_real(nr[y][x]) - to_real(hr[y][x]);
          if (d1 < 0) d1 = -d1;
          if (d1 > delta) delta = d1;
          hr[y][x] = nr[y][x]; hi[y][x] = ni[y][x];
          dr[y][x] = er[y][x]; di[y][x] = ei[y][x];
        end
      if (it == 0) first_delta = delta;
      last_delta = delta;
    end

    // filtered image against double precision
    max_err = 0.0; max_mag = 0.0;
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        real e1, e2, m1;
        e1 = to_real(hr[y][x]) - dr[y][x]; if (e1 < 0) e1 = -e1;
        e2 = to_real(hi[y][x]) - di[y][x]; if (e2 < 0) e2 = -e2;
        m1 = dr[y][x] * dr[y][x] + di[y][x] * di[y][x];
        if (e1 > max_err) max_err = e1;
        if (e2 > max_err) max_err = e2;
        if (m1 > max_mag) max_mag = m1;
      end
    max_mag = $sqrt(max_mag);
    $display("image %0dx%0d, %0d iterations: max |y| = %f, max error vs double = %f",
             N, N, ITER, max_mag, max_err);
    $display("state change: first iteration %f, last iteration %f", first_delta, last_delta);
    $display("row %0d real part:", N / 2);
    for (int x = 0; x < N; x++) $write(" %7.3f", to_real(hr[N / 2][x]));
    $write("\n");
    checks++;
    if (max_err > 0.01 * max_mag + 0.002) begin
      failures++;
      $display("FAIL accuracy against double precision");
    end
    checks++;
    if (!(last_delta < 0.01 * first_delta)) begin
      failures++;
      $display("FAIL iteration did not converge");
    end
    $display("mechanisms: real=%0d imag=%0d back_to_back=%0d idle=%0d bu_nonzero=%0d pixels=%0d",
             n_real, n_imag, n_b2b, n_idle, n_bu, n_done);
    checks++;
    if (n_real == 0 || n_imag == 0 || n_b2b == 0 || n_idle == 0 || n_bu == 0 ||
        n_done != N * N * ITER || n_real != n_done || n_imag != n_done) begin
      failures++;
      $display("FAIL a mechanism never occurred or results were lost");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
