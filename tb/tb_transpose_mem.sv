// tb_transpose_mem: fills every line of the transpose memory in each octave
// configuration (N, N/2 and N/4 samples per line of 10, 14 and 18-bit
// samples), reads all lines back position by position and compares, and
// checks the one-clock read latency. Full-scale positive and negative values
// are included so the sign extension of the wider samples is exercised.
//
// The line count and word packing are those of the design; the data pattern
// is this test's own.
module tb_transpose_mem;

  localparam int N = 32, LINES = 16, TW = 10, OCT = 3, SMAX = TW + 4 * (OCT - 1);

  logic clk = 0;
  logic [1:0] oct;
  logic we, re;
  logic [$clog2(LINES)-1:0] wline;
  logic [$clog2(N)-1:0] wpos, rpos;
  logic signed [SMAX-1:0] wdata [2];
  logic signed [SMAX-1:0] rdata [LINES];

  transpose_mem #(.N(N), .LINES(LINES), .TW(TW), .OCTAVES(OCT)) u_dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model [LINES][N];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    we = 0; re = 0; oct = 0; wline = 0; wpos = 0; rpos = 0;
    wdata[0] = '0; wdata[1] = '0;
    for (int k = 0; k < OCT; k++) begin
      int len, w;
      len = N >> k;
      w = TW + 4 * k;
      @(negedge clk);
      oct = 2'(k);
      for (int l = 0; l < LINES; l++)
        for (int p = 0; p < len; p += 2) begin
          for (int s = 0; s < 2; s++) begin
            int v;
            case ($urandom % 4)
              0: v = (1 <<< (w - 1)) - 1;
              1: v = -(1 <<< (w - 1));
              default: v = -(1 <<< (w - 1)) + int'($urandom % (1 << w));
            endcase
            model[l][p + s] = v;
            wdata[s] = SMAX'(v);
          end
          we = 1; wline = 4'(l); wpos = 5'(p);
          @(negedge clk);
        end
      we = 0;
      for (int p = 0; p < len; p++) begin
        re = 1; rpos = 5'(p);
        @(posedge clk);
        #1;
        re = 0;
        for (int l = 0; l < LINES; l++)
          check(int'(rdata[l]) == model[l][p],
                $sformatf("oct %0d line %0d pos %0d got %0d want %0d",
                          k, l, p, rdata[l], model[l][p]));
        @(negedge clk);
      end
    end
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
