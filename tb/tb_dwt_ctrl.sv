// tb_dwt_ctrl: walks the octave scheduler through a three-octave transform
// with a model of the datapath's completion signals, and checks the octave
// order, image side, per-octave word lengths (8/10, 12/14, 16/18 bits), the
// start pulses, that no octave starts before the previous one has drained,
// and the done pulse.
//
// The word lengths checked are the ones the architecture gives for three
// octaves; the completion model is this test's own.
module tb_dwt_ctrl;

  localparam int N = 512, IN_W = 8, K = 3;

  logic clk = 0, rst_n = 1, go = 0;
  logic row_done, col_done, eiu_idle;
  logic busy, done, start, last;
  logic [1:0] oct;
  logic [$clog2(N):0] len;
  logic [4:0] row_w, col_w;

  dwt_ctrl #(.N(N), .IN_W(IN_W), .OCTAVES(K)) u_dut (.*);

  always #5 clk = ~clk;

  // reset: a falling edge of rst_n shortly after time 0
  initial #1 rst_n = 0;

  int checks = 0, failures = 0;
  int starts = 0, work = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // datapath model: an octave takes 20 clocks, then the EIU drains for 5
  always_ff @(posedge clk) begin
    if (start) work <= 25;
    else if (work > 0) work <= work - 1;
  end
  assign row_done = busy && work <= 8;
  assign col_done = busy && work <= 5;
  assign eiu_idle = work == 0;

  initial begin
    int exp_row [K] = '{8, 12, 16};
    int exp_col [K] = '{10, 14, 18};
    int t;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(!busy, "idle after reset");
    go <= 1;
    @(posedge clk);
    go <= 0;
    #1;
    for (int k = 0; k < K; k++) begin
      t = 0;
      while (!start) begin @(posedge clk); #1; t++; end
      check(k > 0 ? t <= 30 : t <= 2, "start follows promptly");
      check(work == 0 || k == 0, "octave starts only after the previous drained");
      check(int'(oct) == k, $sformatf("octave %0d", k));
      check(int'(len) == (N >> k), "image side");
      check(int'(row_w) == exp_row[k], "row filter width");
      check(int'(col_w) == exp_col[k], "column filter width");
      check(last == (k == K - 1), "last flag");
      @(posedge clk); #1;
    end
    t = 0;
    while (!done && t < 100) begin @(posedge clk); #1; t++; end
    check(done, "done pulse");
    check(eiu_idle, "done only after the last octave drained");
    @(posedge clk); #1;
    check(!done && !busy, "done is one clock, then idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
