// tb_dwt2d_top: end-to-end test of the 2-D DWT at a reduced image size.
//
// Streams a random N x N 8-bit image (with flat black and white patches and
// random gaps on the pixel port) through a three-octave transform, keeps an
// off-chip memory model, and compares every word of the resulting coefficient
// pyramid with a direct-form reference: the same (13,7) taps applied by plain
// convolution with whole-sample symmetric extension and floor rounding,
// row pass then column pass, octave by octave. It also checks the clock count
// against the two-samples-per-clock rate of the blocking schedule and counts
// the mechanisms the design relies on: transpose-memory back-pressure on the
// row side and pixel-port back-pressure within the image
// (reported only: neither occurs at these rates), input blocking while
// the higher octaves run, octave reconfigurations, LL read-back,
// edge folding, and the widened word length actually being used.
//
// The reference transform is a plain convolution written in this test; the
// image patterns and input gaps are this test's own.
module tb_dwt2d_top;
  import dwt_pkg::*;

  localparam int N    = 64;
  localparam int K    = 3;
  localparam int IN_W = 8;
  localparam int CW   = IN_W + 4 * K;
  localparam int MAW  = 2 * $clog2(N);
  localparam int MEMW = N * N;

  logic clk = 0, rst_n = 1, go = 0;
  logic busy, done;
  logic [1:0] octave;
  logic pix_valid, pix_ready;
  logic [IN_W-1:0] pix_data [2];
  logic mem_we, mem_re;
  logic [MAW-1:0] mem_waddr, mem_raddr;
  logic [2*CW-1:0] mem_wdata, mem_rdata;

  dwt2d_top #(.N(N), .OCTAVES(K), .IN_W(IN_W)) u_dut (.*);

  always #5 clk = ~clk;

  // reset: a falling edge of rst_n shortly after time 0
  initial #1 rst_n = 0;

  // off-chip memory model: simple dual port, one-clock read latency
  logic [2*CW-1:0] mem [MEMW];
  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_waddr] <= mem_wdata;
    if (mem_re) mem_rdata <= mem[mem_raddr];
  end

  int checks = 0, failures = 0;
  int img [N][N];
  int ref_c [N][N];   // reference pyramid
  int cur [N][N];
  int lo [N][N], hi [N][N];

  // ---------------------------------------------------------------- reference
  function automatic int mir(int i, int len);
    int p, r;
    p = 2 * (len - 1);
    r = i % p;
    if (r < 0) r += p;
    if (r >= len) r = p - r;
    return r;
  endfunction

  task automatic ref_octave(int m);
    // rows
    for (int r = 0; r < m; r++)
      for (int i = 0; i < m / 2; i++) begin
        int sl, sh;
        sl = 0; sh = 0;
        for (int t = 0; t < WIN; t++) begin
          sl += int'(LPF_TAPS[t]) * cur[r][mir(2*i - 6 + t, m)];
          sh += int'(HPF_TAPS[t]) * cur[r][mir(2*i - 6 + t, m)];
        end
        lo[r][i] = sl >>> FRAC;
        hi[r][i] = sh >>> FRAC;
      end
    // columns
    for (int c = 0; c < m / 2; c++)
      for (int j = 0; j < m / 2; j++) begin
        int ll, lh, hl, hh;
        ll = 0; lh = 0; hl = 0; hh = 0;
        for (int t = 0; t < WIN; t++) begin
          ll += int'(LPF_TAPS[t]) * lo[mir(2*j - 6 + t, m)][c];
          lh += int'(HPF_TAPS[t]) * lo[mir(2*j - 6 + t, m)][c];
          hl += int'(LPF_TAPS[t]) * hi[mir(2*j - 6 + t, m)][c];
          hh += int'(HPF_TAPS[t]) * hi[mir(2*j - 6 + t, m)][c];
        end
        ref_c[j][c]             = ll >>> FRAC;
        ref_c[j][c + m/2]       = hl >>> FRAC;
        ref_c[j + m/2][c]       = lh >>> FRAC;
        ref_c[j + m/2][c + m/2] = hh >>> FRAC;
      end
    for (int r = 0; r < m / 2; r++)
      for (int c = 0; c < m / 2; c++) cur[r][c] = ref_c[r][c];
  endtask

  // -------------------------------------------------------------- stimulus
  int px_r, px_c;
  int n_pix_stall = 0, n_blocked = 0, n_row_stall = 0, n_reconf = 0, n_readback = 0;
  int n_fold = 0, n_wide = 0, n_gap = 0, cycles = 0;
  logic [1:0] last_oct;

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

  logic gap;
  always_ff @(posedge clk) gap <= ($urandom % 8) == 0;
  // After the image, the first pixels of a next image are offered at once:
  // they must be held off until the transform has finished.
  assign pix_valid = rst_n && ((busy && octave == 0 && px_r < N && !gap) || px_r >= N);

  // mechanism counters
  always_ff @(posedge clk) if (rst_n) begin
    if (busy) cycles <= cycles + 1;
    if (pix_valid && !pix_ready && px_r < N) n_pix_stall <= n_pix_stall + 1;
    if (pix_valid && !pix_ready && px_r >= N && busy) n_blocked <= n_blocked + 1;
    if (busy && octave == 0 && px_r < N && gap) n_gap <= n_gap + 1;
    if (u_dut.u_row_siu.active && u_dut.u_row_siu.row < u_dut.u_row_siu.m &&
        u_dut.u_row_siu.idx < u_dut.u_row_siu.half &&
        u_dut.u_row_siu.op_pairs > u_dut.u_row_siu.need &&
        !(u_dut.u_row_siu.row < u_dut.wr_row_limit))
      n_row_stall <= n_row_stall + 1;
    if (octave != last_oct && busy) n_reconf <= n_reconf + 1;
    last_oct <= octave;
    if (mem_re) n_readback <= n_readback + 1;
    if (u_dut.rop_valid && (u_dut.rop_idx < 3 ||
        32'(u_dut.rop_idx) + 3 >= 32'(u_dut.len) / 2)) n_fold <= n_fold + 1;
    // a row-filter output that needs the two bits of word growth
    if (u_dut.rf_valid && (u_dut.rf_hpf >= (1 <<< (u_dut.row_w - 1)) ||
                           u_dut.rf_hpf < -(1 <<< (u_dut.row_w - 1)))) n_wide <= n_wide + 1;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int expect_cycles, wc;
    px_r = 0; px_c = 0; last_oct = 0;
    for (int a = 0; a < MEMW; a++) mem[a] = '0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        img[r][c] = $urandom % 256;
        if (r < 8 && c < 8) img[r][c] = 255;           // flat white patch
        if (r >= N - 8 && c >= N - 8) img[r][c] = 0;   // flat black patch
        if (r >= 16 && r < 24) img[r][c] = (c % 2) ? 255 : 0;  // full-scale stripes
        cur[r][c] = img[r][c] - 128;
      end
    for (int k = 0; k < K; k++) ref_octave(N >> k);

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
        check(int'($signed(w[CW-1:0])) == ref_c[r][c] &&
              int'($signed(w[2*CW-1:CW])) == ref_c[r][c+1],
              $sformatf("coef (%0d,%0d): got %0d %0d want %0d %0d", r, c,
                        $signed(w[CW-1:0]), $signed(w[2*CW-1:CW]),
                        ref_c[r][c], ref_c[r][c+1]));
      end

    // two samples per clock: (2/3)(1 - 4^-K) N^2 clocks, plus the clocks the
    // test itself leaves the pixel port idle, per-row and per-octave bubbles
    expect_cycles = 0;
    for (int k = 0; k < K; k++) expect_cycles += (N >> k) * (N >> k) / 2;
    wc = expect_cycles + n_gap + 8 * (2 * N) + 64 * K;
    $display("cycles=%0d ideal=%0d idle_input=%0d bound=%0d", cycles, expect_cycles, n_gap, wc);
    check(cycles >= expect_cycles && cycles <= wc, "clock count");

    $display("mechanisms: input_blocked=%0d pix_stall=%0d row_stall=%0d reconf=%0d readback=%0d fold=%0d wide=%0d",
             n_blocked, n_pix_stall, n_row_stall, n_reconf, n_readback, n_fold, n_wide);
    check(n_blocked > 0, "input blocking during the higher octaves never happened");
    check(px_r == N && px_c == 0, "no pixel of the next image taken during the transform");
    check(n_reconf == K - 1, "octave reconfigurations");
    check(n_readback > 0, "LL read-back never happened");
    check(n_fold > 0, "edge folding never happened");
    check(n_wide > 0, "widened word length never used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
