// tb_eiu: checks the external interface unit on its own, octave by octave
// (image side 16, three octaves):
//   octave 0: pixel pairs reach the row SIU level-shifted, with the row SIU's
//             back-pressure passed back to the pixel port;
//   all octaves: column-filter outputs are aligned into two-coefficient words
//             at the pyramid (or scratch) addresses; the memory image is
//             compared with an independently computed layout;
//   octaves 1, 2: the previous LL band is read back from the scratch area in
//             raster order, under random row-SIU back-pressure.
//
// The expected addresses come from the layout written out independently in
// this test; the band order and level shift are those of the design.
module tb_eiu;
  import dwt_pkg::*;

  localparam int N = 16, IN_W = 8, OCT = 3;
  localparam int RW = IN_W + 4 * (OCT - 1), CW = IN_W + 4 * OCT, MAW = 2 * $clog2(N);
  localparam int AW = $clog2(N);

  logic clk = 0, rst_n = 1, start = 0, last = 0;
  logic [1:0] oct;
  logic [AW:0] len;
  logic pix_valid, pix_ready;
  logic [IN_W-1:0] pix_data [2];
  logic rs_valid, rs_ready;
  logic signed [RW-1:0] rs_pair [2];
  logic cf_valid;
  logic signed [CW-1:0] cf_lpf, cf_hpf;
  col_band_e cf_band;
  logic [AW-1:0] cf_row, cf_col;
  logic mem_we, mem_re;
  logic [MAW-1:0] mem_waddr, mem_raddr;
  logic [2*CW-1:0] mem_wdata, mem_rdata;
  logic idle;

  eiu #(.N(N), .IN_W(IN_W), .OCTAVES(OCT)) u_dut (.*);

  always #5 clk = ~clk;

  // reset: a falling edge of rst_n shortly after time 0
  initial #1 rst_n = 0;

  localparam int MEMW = N * N;
  logic [2*CW-1:0] mem [MEMW];
  int writes = 0;
  always_ff @(posedge clk) begin
    if (mem_we) begin mem[mem_waddr] <= mem_wdata; writes <= writes + 1; end
    if (mem_re) mem_rdata <= mem[mem_raddr];
  end

  int checks = 0, failures = 0;
  int ll [N][N];      // LL band written by the previous octave
  int pyr [N][N];     // expected pyramid
  int n_stall = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always_ff @(posedge clk) rs_ready <= ($urandom % 3) != 0;

  initial begin
    int scr [2];
    scr[0] = N * N / 2;
    scr[1] = N * N / 2 + N * N / 8;
    cf_valid = 0; cf_lpf = 0; cf_hpf = 0; cf_band = BAND_L; cf_row = 0; cf_col = 0;
    pix_valid = 0; pix_data[0] = 0; pix_data[1] = 0; oct = 0; len = 0;
    for (int a = 0; a < MEMW; a++) mem[a] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < OCT; k++) begin
      int m, h, n_in, t;
      m = N >> k;
      h = m / 2;
      @(negedge clk);
      oct = 2'(k); len = (AW+1)'(m); last = (k == OCT - 1);
      start = 1;
      @(negedge clk);
      start = 0;
      // ---- input side
      n_in = 0;
      t = 0;
      while (n_in < m * m / 2 && t < 5000) begin
        int a0, a1;
        if (k == 0) begin
          pix_valid = 1;
          pix_data[0] = IN_W'($urandom);
          pix_data[1] = IN_W'($urandom);
          a0 = int'(pix_data[0]) - 128;
          a1 = int'(pix_data[1]) - 128;
        end else begin
          a0 = ll[n_in / h][2 * (n_in % h)];
          a1 = ll[n_in / h][2 * (n_in % h) + 1];
        end
        #1;
        if (k == 0) check(pix_ready == rs_ready && rs_valid, "pixel port follows the row SIU");
        if (rs_valid && rs_ready) begin
          check(int'(rs_pair[0]) == a0 && int'(rs_pair[1]) == a1,
                $sformatf("oct %0d pair %0d: got %0d %0d want %0d %0d",
                          k, n_in, rs_pair[0], rs_pair[1], a0, a1));
          n_in++;
        end else if (rs_valid) n_stall++;
        @(negedge clk);
        t++;
      end
      pix_valid = 0;
      check(n_in == m * m / 2, "all input pairs delivered");
      // ---- output side: one column operation per clock, j outer, position inner
      for (int j = 0; j < h; j++)
        for (int p = 0; p < m; p++) begin
          int c, vl, vh;
          c = p / 2;
          vl = -(1 << (CW - 1)) + int'($urandom % (1 << CW));
          vh = -(1 << (CW - 1)) + int'($urandom % (1 << CW));
          // an LL coefficient fits the next octave's row-filter width
          if (p % 2 == 0)
            vl = -(1 << (IN_W + 4 * k + 3)) + int'($urandom % (1 << (IN_W + 4 * k + 4)));
          cf_valid = 1; cf_band = col_band_e'(p % 2);
          cf_row = AW'(j); cf_col = AW'(c);
          cf_lpf = CW'(vl); cf_hpf = CW'(vh);
          if (p % 2 == 0) begin
            ll[j][c] = vl;                   // LL
            pyr[j][c] = vl;
            pyr[j + h][c] = vh;              // LH
          end else begin
            pyr[j][c + h] = vl;              // HL
            pyr[j + h][c + h] = vh;          // HH
          end
          @(negedge clk);
        end
      cf_valid = 0;
      t = 0;
      while (!idle && t < 100) begin @(negedge clk); t++; end
      check(idle, "output queue drains");
      // LL of all but the last octave goes to the scratch area k mod 2
      for (int y = 0; y < m; y++)
        for (int x = 0; x < m; x += 2) begin
          logic [2*CW-1:0] w;
          if (y < h && x < h && k != OCT - 1)
            w = mem[scr[k % 2] + y * (h / 2) + x / 2];
          else
            w = mem[y * (N / 2) + x / 2];
          check(int'($signed(w[CW-1:0])) == pyr[y][x] &&
                int'($signed(w[2*CW-1:CW])) == pyr[y][x + 1],
                $sformatf("oct %0d word (%0d,%0d)", k, y, x));
        end
    end
    check(writes == (N * N + N * N / 4 + N * N / 16) / 2, $sformatf("write count %0d", writes));
    check(n_stall > 0, "row-SIU back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
