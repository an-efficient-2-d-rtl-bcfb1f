// tb_row_siu: streams rows of random samples into the row SIU for image sides
// 32, 8 and 4, with random input gaps and random column-side blocking
// (wr_row_limit), and checks every window it emits (rebuilt from the
// look-up table address slices) against the row with
// whole-sample symmetric extension, the operation order, the number of
// operations per image and the done flag.
//
// The 13-sample window and 16-sample delay line are those of the design; the
// random gaps and the column-side limit pattern are this test's own.
module tb_row_siu;
  import dwt_pkg::*;

  localparam int N = 32, WMAX = 16;
  localparam int LW = $clog2(N) + 1;

  logic clk = 0, rst_n = 1, start = 0;
  logic [LW-1:0] len;
  logic in_valid, in_ready;
  logic signed [WMAX-1:0] in_pair [2];
  logic [LW-1:0] wr_row_limit;
  logic op_valid;
  pda_addr_t addr [WMAX];
  logic [LW-2:0] op_row, op_idx;
  logic done;

  row_siu #(.N(N), .WMAX(WMAX)) u_dut (.*);

  always #5 clk = ~clk;

  // reset: a falling edge of rst_n shortly after time 0
  initial #1 rst_n = 0;

  int checks = 0, failures = 0;
  int x [N][N];
  int m, in_r, in_p, exp_r, exp_i, n_block = 0;

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

  // input driver
  always_ff @(posedge clk) if (in_valid && in_ready) begin
    if (in_p == m / 2 - 1) begin in_p <= 0; in_r <= in_r + 1; end
    else in_p <= in_p + 1;
  end
  logic gap, block;
  always_ff @(posedge clk) begin
    gap   <= ($urandom % 5) == 0;
    block <= ($urandom % 6) == 0;
  end
  assign in_valid = rst_n && in_r < m && !gap;
  assign in_pair[0] = WMAX'(x[in_r < m ? in_r : 0][2 * in_p]);
  assign in_pair[1] = WMAX'(x[in_r < m ? in_r : 0][2 * in_p + 1]);
  assign wr_row_limit = block ? LW'(0) : '1;

  // output monitor
  always @(posedge clk) if (rst_n) begin
    if (!op_valid && block && u_dut.active && u_dut.idx < u_dut.half &&
        u_dut.op_pairs > u_dut.need && u_dut.row < u_dut.m)
      n_block++;
    if (op_valid) begin
      check(int'(op_row) == exp_r && int'(op_idx) == exp_i,
            $sformatf("order: got %0d/%0d want %0d/%0d", op_row, op_idx, exp_r, exp_i));
      for (int t = 0; t < WIN; t++)
        check(int'($signed(sample_of(addr, t))) == x[exp_r][mir(2 * exp_i - 6 + t, m)],
              $sformatf("m=%0d row %0d op %0d tap %0d", m, exp_r, exp_i, t));
      check(hp_consistent(addr), "high-pass table addresses");
      if (exp_i == m / 2 - 1) begin exp_i = 0; exp_r++; end
      else exp_i++;
    end
  end

  initial begin
    int sides [3] = '{32, 8, 4};
    m = 4; in_r = 4; in_p = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (sides[s]) begin
      int t;
      @(negedge clk);
      m = sides[s];
      for (int r = 0; r < m; r++)
        for (int c = 0; c < m; c++)
          x[r][c] = -(1 << (WMAX - 1)) + int'($urandom % (1 << WMAX));
      exp_r = 0; exp_i = 0;
      len = LW'(m);
      start = 1;
      @(negedge clk);
      start = 0;
      in_r = 0; in_p = 0;
      t = 0;
      while (!done && t < 10000) begin @(negedge clk); t++; end
      check(done, "done");
      check(exp_r == m, $sformatf("all %0d rows processed (got %0d)", m, exp_r));
    end
    $display("blocked clocks: %0d", n_block);
    check(n_block > 0, "column-side blocking never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
