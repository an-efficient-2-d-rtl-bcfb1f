// tb_col_siu: feeds row-filter results (random low-pass and high-pass values
// of the octave's word length) into the column SIU for image sides 32, 16, 8
// and 4 in the octave configurations 0, 1, 2 and 2, with random gaps and
// respecting wr_row_limit (the row side never catches up with it at equal
// rates; the count is reported), and checks every column window (rebuilt from the look-up table
// address slices) against the stored
// rows with symmetric extension at the top and bottom, the L/H column
// interleaving order, and the done flag.
//
// The window and line count are those of the design; the expected windows
// come from the rows the test itself stored, not from the memory.
module tb_col_siu;
  import dwt_pkg::*;

  localparam int N = 32, LINES = 16, TW = 10, OCT = 3, WMAX = TW + 4 * (OCT - 1);
  localparam int AW = $clog2(N);

  logic clk = 0, rst_n = 1, start = 0;
  logic [AW:0] len;
  logic [1:0] oct;
  logic in_valid;
  logic signed [WMAX-1:0] in_lpf, in_hpf;
  logic [AW-1:0] in_row, in_idx;
  logic [AW:0] wr_row_limit;
  logic out_valid;
  pda_addr_t addr [WMAX];
  col_band_e out_band;
  logic [AW-1:0] out_row, out_col;
  logic done;

  col_siu #(.N(N), .LINES(LINES), .TW(TW), .OCTAVES(OCT)) u_dut (.*);

  always #5 clk = ~clk;

  // reset: a falling edge of rst_n shortly after time 0
  initial #1 rst_n = 0;

  int checks = 0, failures = 0;
  int lo [N][N], hi [N][N];
  int m, exp_j, exp_p, n_out, n_limit = 0;

  // Sample t of a window, rebuilt from the look-up table address slices.
  function automatic logic [WMAX-1:0] sample_of(pda_addr_t a [WMAX], int t);
    logic [WMAX-1:0] v;
    for (int k = 0; k < WMAX; k++) v[k] = (t % 2 == 0) ? a[k].le[t/2] : a[k].lo[t/2];
    return v;
  endfunction

  // The high-pass tables must see the same samples as the low-pass ones.
  function automatic bit hp_consistent(pda_addr_t a [WMAX]);
    for (int k = 0; k < WMAX; k++) begin
      for (int u = 0; u < HE_TAPS; u++) if (a[k].he[u] != a[k].le[2 + u]) return 0;
      if (a[k].ho[0] != a[k].lo[3]) return 0;
    end
    return 1;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int mir(int i, int len_);
    int p, r;
    p = 2 * (len_ - 1);
    r = i % p;
    if (r < 0) r += p;
    if (r >= len_) r = p - r;
    return r;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    int c;
    c = exp_p / 2;
    check(int'(out_row) == exp_j && int'(out_col) == c &&
          out_band == col_band_e'(exp_p % 2),
          $sformatf("order: got j=%0d c=%0d b=%0d want %0d %0d %0d",
                    out_row, out_col, out_band, exp_j, c, exp_p % 2));
    for (int t = 0; t < WIN; t++) begin
      int e;
      e = (exp_p % 2) ? hi[mir(2 * exp_j - 6 + t, m)][c] : lo[mir(2 * exp_j - 6 + t, m)][c];
      check(int'($signed(sample_of(addr, t))) == e,
            $sformatf("m=%0d j=%0d pos=%0d tap %0d", m, exp_j, exp_p, t));
    end
    check(hp_consistent(addr), "high-pass table addresses");
    n_out++;
    if (exp_p == m - 1) begin exp_p = 0; exp_j++; end
    else exp_p++;
  end

  initial begin
    int sides [4] = '{32, 16, 8, 4};
    int octs [4] = '{0, 1, 2, 2};
    in_valid = 0; in_lpf = 0; in_hpf = 0; in_row = 0; in_idx = 0; oct = 0; len = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (sides[s]) begin
      int w, t;
      m = sides[s];
      w = TW + 4 * octs[s];
      for (int r = 0; r < m; r++)
        for (int i = 0; i < m / 2; i++) begin
          lo[r][i] = -(1 << (w - 1)) + int'($urandom % (1 << w));
          hi[r][i] = -(1 << (w - 1)) + int'($urandom % (1 << w));
        end
      @(negedge clk);
      oct = 2'(octs[s]);
      len = (AW+1)'(m);
      exp_j = 0; exp_p = 0; n_out = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      for (int r = 0; r < m; r++)
        for (int i = 0; i < m / 2; i++) begin
          while (!(32'(r) < 32'(wr_row_limit))) begin
            n_limit++;
            @(negedge clk);
          end
          if ($urandom % 4 == 0) @(negedge clk);
          in_valid = 1; in_row = AW'(r); in_idx = AW'(i);
          in_lpf = WMAX'(lo[r][i]); in_hpf = WMAX'(hi[r][i]);
          @(negedge clk);
          in_valid = 0;
        end
      t = 0;
      while (!done && t < 5000) begin @(negedge clk); t++; end
      check(done, "done");
      check(n_out == m * m / 2, $sformatf("window count %0d", n_out));
    end
    $display("row-side clocks held by wr_row_limit: %0d", n_limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
