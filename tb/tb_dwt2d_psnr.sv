// tb_dwt2d_psnr: reconstruction quality of the fixed-point transform at its
// default size (512 x 512, three octaves, 8-bit pixels).
//
// Streams a smooth synthetic 8-bit image (two low-frequency waves, a diagonal
// ripple and a little random texture, standing in for a photograph) through
// the design with an off-chip memory model, then rebuilds the image from the
// three-octave coefficient pyramid with an inverse transform written here in
// floating point: the (13,7) lifting steps run backwards, columns then rows,
// coarsest octave first, with whole-sample symmetric extension. Every value
// the hardware truncated (row outputs, column outputs, read-back LL) gets half
// an LSB added back before it is used, since floor rounding biases it down by
// that much on average. The rebuilt pixels are rounded, clipped to 0..255 and
// compared with the original as PSNR = 10 log10(255^2 / MSE).
//
// Checks: the inverse itself is exact (a floating-point forward transform of
// the same image comes back within 1e-6), and the design's PSNR is above
// 39.3 dB, the figure a transform held to 8 bits throughout reaches; the
// measured value is printed. The bound and the 8-bit comparison come from the
// evaluation of this architecture; the image and the bias correction are this
// test's own. No parameters of the design are overridden.
module tb_dwt2d_psnr;
  import dwt_pkg::*;

  localparam int N    = 512;
  localparam int K    = 3;
  localparam int IN_W = 8;
  localparam int CW   = IN_W + 4 * K;
  localparam int MAW  = 2 * $clog2(N);
  localparam int MEMW = N * N;
  localparam real PSNR_8BIT = 39.3;

  logic clk = 0, rst_n = 1, go = 0;
  logic busy, done;
  logic [1:0] octave;
  logic pix_valid, pix_ready;
  logic [IN_W-1:0] pix_data [2];
  logic mem_we, mem_re;
  logic [MAW-1:0] mem_waddr, mem_raddr;
  logic [2*CW-1:0] mem_wdata, mem_rdata;

  dwt2d_top u_dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  // off-chip memory model: simple dual port, one-clock read latency
  logic [2*CW-1:0] mem [MEMW];
  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_waddr] <= mem_wdata;
    if (mem_re) mem_rdata <= mem[mem_raddr];
  end

  int checks = 0, failures = 0;
  int  img [N][N];
  real pyr [N][N];    // coefficient pyramid being inverted
  real a [N][N];      // work plane
  real lo [N][N], hi [N][N];
  real vs [N/2], vd [N/2], vx [N];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int mir(int i, int len);
    int p, r;
    p = 2 * (len - 1);
    r = i % p;
    if (r < 0) r += p;
    if (r >= len) r = p - r;
    return r;
  endfunction

  // ------------------------------------------------ floating-point transforms
  // forward octave on a[0..m-1][0..m-1] in place (pyramid layout), no rounding
  task automatic fwd_octave(int m);
    for (int r = 0; r < m; r++)
      for (int i = 0; i < m / 2; i++) begin
        real sl, sh;
        sl = 0.0; sh = 0.0;
        for (int t = 0; t < WIN; t++) begin
          sl += real'(LPF_TAPS[t]) * a[r][mir(2*i - 6 + t, m)];
          sh += real'(HPF_TAPS[t]) * a[r][mir(2*i - 6 + t, m)];
        end
        lo[r][i] = sl / 512.0;
        hi[r][i] = sh / 512.0;
      end
    for (int c = 0; c < m / 2; c++)
      for (int j = 0; j < m / 2; j++) begin
        real ll, lh, hl, hh;
        ll = 0.0; lh = 0.0; hl = 0.0; hh = 0.0;
        for (int t = 0; t < WIN; t++) begin
          ll += real'(LPF_TAPS[t]) * lo[mir(2*j - 6 + t, m)][c];
          lh += real'(HPF_TAPS[t]) * lo[mir(2*j - 6 + t, m)][c];
          hl += real'(LPF_TAPS[t]) * hi[mir(2*j - 6 + t, m)][c];
          hh += real'(HPF_TAPS[t]) * hi[mir(2*j - 6 + t, m)][c];
        end
        a[j][c]             = ll / 512.0;
        a[j][c + m/2]       = hl / 512.0;
        a[j + m/2][c]       = lh / 512.0;
        a[j + m/2][c + m/2] = hh / 512.0;
      end
  endtask

  // one-dimensional inverse: vs/vd (m/2 each) -> vx (m). Low-pass sample n
  // sits at position 2n, high-pass sample n at 2n+1; positions outside the
  // signal are mirrored, which keeps their parity.
  function automatic real d_at(int p, int m);
    return vd[(mir(p, m) - 1) / 2];
  endfunction

  task automatic inv1d(int m);
    real xe [N/2];
    for (int n = 0; n < m / 2; n++)
      xe[n] = vs[n] - (9.0 * (d_at(2*n - 1, m) + d_at(2*n + 1, m))
                       - (d_at(2*n - 3, m) + d_at(2*n + 3, m))) / 32.0;
    for (int n = 0; n < m / 2; n++) begin
      vx[2*n] = xe[n];
      vx[2*n + 1] = vd[n] + (9.0 * (xe[mir(2*n, m) / 2] + xe[mir(2*n + 2, m) / 2])
                             - (xe[mir(2*n - 2, m) / 2] + xe[mir(2*n + 4, m) / 2])) / 16.0;
    end
  endtask

  // inverse octave on pyr[0..m-1][0..m-1] in place; bias is added to every
  // value that was truncated on the way in (0.5 for the hardware, 0 for the
  // floating-point check)
  task automatic inv_octave(int m, real bias);
    for (int c = 0; c < m / 2; c++) begin
      for (int j = 0; j < m / 2; j++) begin
        vs[j] = pyr[j][c] + bias;
        vd[j] = pyr[j + m/2][c] + bias;
      end
      inv1d(m);
      for (int r = 0; r < m; r++) lo[r][c] = vx[r] + bias;
      for (int j = 0; j < m / 2; j++) begin
        vs[j] = pyr[j][c + m/2] + bias;
        vd[j] = pyr[j + m/2][c + m/2] + bias;
      end
      inv1d(m);
      for (int r = 0; r < m; r++) hi[r][c] = vx[r] + bias;
    end
    for (int r = 0; r < m; r++) begin
      for (int i = 0; i < m / 2; i++) begin
        vs[i] = lo[r][i];
        vd[i] = hi[r][i];
      end
      inv1d(m);
      for (int c = 0; c < m; c++) pyr[r][c] = vx[c];
    end
  endtask

  // -------------------------------------------------------------- stimulus
  int px_r = 0, px_c = 0;

  always_ff @(posedge clk) begin
    if (rst_n && pix_valid && pix_ready) begin
      if (px_c == N - 2) begin px_c <= 0; px_r <= px_r + 1; end
      else px_c <= px_c + 2;
    end
  end

  always_comb begin
    pix_data[0] = IN_W'(img[px_r < N ? px_r : 0][px_c]);
    pix_data[1] = IN_W'(img[px_r < N ? px_r : 0][px_c + 1]);
  end

  assign pix_valid = rst_n && busy && octave == 0 && px_r < N;

  initial begin
    real err, mse, psnr;
    int  v;
    for (int ad = 0; ad < MEMW; ad++) mem[ad] = '0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        real f;
        f = 128.0 + 70.0 * $sin(r / 41.0) * $cos(c / 29.0)
                  + 30.0 * $sin((r + 2 * c) / 9.0)
                  + real'($urandom % 17) - 8.0;
        v = int'(f);
        img[r][c] = v < 0 ? 0 : v > 255 ? 255 : v;
      end

    // the inverse undoes a floating-point forward transform exactly
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) a[r][c] = real'(img[r][c] - 128);
    for (int k = 0; k < K; k++) fwd_octave(N >> k);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) pyr[r][c] = a[r][c];
    for (int k = K - 1; k >= 0; k--) inv_octave(N >> k, 0.0);
    err = 0.0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        real e;
        e = pyr[r][c] - real'(img[r][c] - 128);
        if (e < 0.0) e = -e;
        if (e > err) err = e;
      end
    $display("floating-point round trip: largest error %g", err);
    check(err < 1e-6, "inverse transform does not undo the forward one");

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    go <= 1;
    @(posedge clk);
    go <= 0;
    wait (done);
    @(posedge clk);

    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c += 2) begin
        logic [2*CW-1:0] w;
        w = mem[r * (N/2) + c/2];
        pyr[r][c]     = real'(int'($signed(w[CW-1:0])));
        pyr[r][c + 1] = real'(int'($signed(w[2*CW-1:CW])));
      end
    // every band, and the LL rebuilt from a coarser octave, is a truncated
    // column output: inv_octave adds the half LSB back to all of them
    for (int k = K - 1; k >= 0; k--) inv_octave(N >> k, 0.5);

    mse = 0.0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        real x;
        x = pyr[r][c] + 128.0;
        v = x < 0.0 ? 0 : x > 255.0 ? 255 : int'($floor(x + 0.5));
        mse += real'((v - img[r][c]) * (v - img[r][c]));
      end
    mse = mse / real'(N * N);
    psnr = (mse == 0.0) ? 999.0 : 10.0 * $log10(255.0 * 255.0 / mse);
    $display("reconstruction: mse=%f psnr=%f dB (8-bit datapath reference %f dB)",
             mse, psnr, PSNR_8BIT);
    check(psnr > PSNR_8BIT, "reconstruction PSNR not above the 8-bit datapath figure");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
