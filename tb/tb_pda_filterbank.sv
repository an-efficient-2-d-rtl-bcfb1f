// tb_pda_filterbank: checks the distributed-arithmetic filter pair (fed with
// the bit slices of a window) against a
// plain multiply-accumulate of the same taps, for random windows at every
// word length the datapath uses (8..18 bits, including full-scale values),
// and checks the one-clock latency and the tag path.
//
// The tap values and word lengths are those of the design; the expected
// values come from a direct multiply-accumulate, not from the look-up
// tables.
module tb_pda_filterbank;
  import dwt_pkg::*;

  localparam int WMAX = 18;
  localparam int TAG_W = 8;

  logic clk = 0, rst_n = 1;
  logic [4:0] act_w;
  logic in_valid;
  logic signed [WMAX-1:0] win [WIN];
  pda_addr_t addr [WMAX];
  logic [TAG_W-1:0] in_tag, out_tag;
  logic out_valid;
  logic signed [WMAX+GROW-1:0] lpf, hpf;

  pda_filterbank #(.WMAX(WMAX), .TAG_W(TAG_W)) u_dut (.*);

  always #5 clk = ~clk;

  // reset: a falling edge of rst_n shortly after time 0
  initial #1 rst_n = 0;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int widths [6] = '{8, 10, 12, 14, 16, 18};
    rst_n = 0; in_valid = 0; act_w = 8; in_tag = 0;
    for (int t = 0; t < WIN; t++) win[t] = '0;
    for (int k = 0; k < WMAX; k++) addr[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int w, el, eh, v, lo_lim, hi_lim;
      w = widths[n % 6];
      lo_lim = -(1 <<< (w - 1));
      hi_lim = (1 <<< (w - 1)) - 1;
      el = 0; eh = 0;
      @(negedge clk);
      act_w = 5'(w);
      in_valid = 1;
      in_tag = TAG_W'(n);
      for (int t = 0; t < WIN; t++) begin
        case (n % 5)
          0: v = ((t % 2) == 0) ? hi_lim : lo_lim;   // worst case for the high-pass
          1: v = (LPF_TAPS[t] >= 0) ? hi_lim : lo_lim;
          default: v = lo_lim + int'($urandom % (1 << w));
        endcase
        win[t] = WMAX'(v);
        el += int'(LPF_TAPS[t]) * v;
        eh += int'(HPF_TAPS[t]) * v;
      end
      // bit slices of the window, as a stream interface unit delivers them
      for (int k = 0; k < WMAX; k++) begin
        for (int u = 0; u < LE_TAPS; u++) addr[k].le[u] = win[2*u][k];
        for (int u = 0; u < LO_TAPS; u++) addr[k].lo[u] = win[2*u+1][k];
        for (int u = 0; u < HE_TAPS; u++) addr[k].he[u] = win[4+2*u][k];
        addr[k].ho[0] = win[7][k];
      end
      @(posedge clk);
      #1;
      check(out_valid, "out_valid one clock after in_valid");
      check(out_tag == TAG_W'(n), "tag");
      check(int'(lpf) == (el >>> FRAC),
            $sformatf("lpf w=%0d got %0d want %0d", w, lpf, el >>> FRAC));
      check(int'(hpf) == (eh >>> FRAC),
            $sformatf("hpf w=%0d got %0d want %0d", w, hpf, eh >>> FRAC));
      // result fits the grown word length w+2
      check(int'(hpf) >= -(1 <<< (w + 1)) && int'(hpf) < (1 <<< (w + 1)), "hpf range");
    end
    @(negedge clk);
    in_valid = 0;
    @(posedge clk);
    #1;
    check(!out_valid, "out_valid drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
