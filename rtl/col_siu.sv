// col_siu: column stream interface unit with the embedded transpose memory.
//
// Write side: each row-filter operation delivers a low-pass and a high-pass
// sample of one row; they are stored side by side (positions 2i and 2i+1) in
// line (row mod LINES) of the transpose memory, so a stored line alternates
// L and H samples. Read side: for each output row pair j of the column
// filters the unit walks the line positions 0..len-1 and, per clock, reads
// one position of all lines and forms the 13-line window at rows 2j-6..2j+6
// (symmetric extension at the top and bottom edges). Walking the positions in
// order interleaves the L columns and the H columns into the single column
// filterbank, which therefore runs one operation per clock, the same rate at
// which the row filterbank delivers samples.
//
// Flow control: column pass j starts once row min(2j+6, len-1) is complete.
// The row side may write row r only while r < max(0, 2j-6) + LINES
// (wr_row_limit), so no line that a pending window needs is overwritten.
// Timing: a read issued in clock t gives out_valid with its window in clock
// t+1 (combinational from the registered memory output). The window leaves as
// look-up table addresses for the column filterbank, one bit slice per bit. done rises when the
// last window has been sent and stays high until the next start.
//
// Follows the architecture: the column filter reads the transposed lines,
// and the L and H columns take turns in one column filterbank. This design's
// own choices: the rule for when a column pass may start, the line-reuse
// limit sent to the row side, the registered window stage, and symmetric
// extension at the top and bottom.
module col_siu
  import dwt_pkg::*;
#(
  parameter int unsigned N       = 512,
  parameter int unsigned LINES   = 16,
  parameter int unsigned TW      = 10,  // first-octave column sample width
  parameter int unsigned OCTAVES = 3,
  parameter int unsigned WMAX    = TW + 4 * (OCTAVES - 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [$clog2(N):0]          len,
  input  logic [1:0]                  oct,
  // from the row filterbank
  input  logic                        in_valid,
  input  logic signed [WMAX-1:0]      in_lpf,
  input  logic signed [WMAX-1:0]      in_hpf,
  input  logic [$clog2(N)-1:0]        in_row,
  input  logic [$clog2(N)-1:0]        in_idx,
  output logic [$clog2(N):0]          wr_row_limit,
  // to the column filterbank
  output logic                        out_valid,
  output pda_addr_t                   addr [WMAX],
  output col_band_e                   out_band,
  output logic [$clog2(N)-1:0]        out_row,  // output row pair j
  output logic [$clog2(N)-1:0]        out_col,  // column within the band
  output logic                        done
);

  localparam int unsigned AW = $clog2(N);
  localparam int unsigned LW = AW + 1;
  localparam int unsigned LI = $clog2(LINES);

  logic [LW-1:0] m, half;
  logic [LW-1:0] rows_done;   // rows completely written
  logic [LW-1:0] j;           // current output row pair
  logic [LW-1:0] pos;         // current line position
  logic          active;
  logic [LW-1:0] need;
  logic          fire;

  logic          s1_valid;
  logic [LW-1:0] s1_j, s1_pos;

  logic signed [WMAX-1:0] rdata [LINES];
  logic signed [WMAX-1:0] win [WIN];
  logic signed [WMAX-1:0] wdata [2];

  assign half = m >> 1;

  always_comb begin
    need = (2 * j + 6 < m) ? 2 * j + 6 : m - 1;
    fire = active && (j < half) && (rows_done > need);
    wr_row_limit = LW'((j > 3 ? 2 * j - 6 : 0) + LINES);
    if (!active || j >= half) wr_row_limit = '1;
  end

  assign wdata[0] = in_lpf;
  assign wdata[1] = in_hpf;

  transpose_mem #(
    .N(N), .LINES(LINES), .TW(TW), .OCTAVES(OCTAVES), .SMAX(WMAX)
  ) u_mem (
    .clk   (clk),
    .oct   (oct),
    .we    (in_valid),
    .wline (in_row[LI-1:0]),
    .wpos  ({in_idx[AW-2:0], 1'b0}),
    .wdata (wdata),
    .re    (fire),
    .rpos  (pos[AW-1:0]),
    .rdata (rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m         <= '0;
      rows_done <= '0;
      j         <= '0;
      pos       <= '0;
      active    <= 1'b0;
      s1_valid  <= 1'b0;
      s1_j      <= '0;
      s1_pos    <= '0;
    end else if (start) begin
      m         <= len;
      rows_done <= '0;
      j         <= '0;
      pos       <= '0;
      active    <= 1'b1;
      s1_valid  <= 1'b0;
    end else begin
      if (in_valid && LW'(in_idx) == half - 1) rows_done <= rows_done + 1'b1;
      s1_valid <= fire;
      if (fire) begin
        s1_j   <= j;
        s1_pos <= pos;
        if (pos == m - 1) begin
          pos <= '0;
          j   <= j + 1'b1;
        end else begin
          pos <= pos + 1'b1;
        end
      end
    end
  end

  // Window from the registered line read, rows folded at the image edges.
  always_comb begin
    logic [LI-1:0] line;
    for (int t = 0; t < WIN; t++) begin
      line   = LI'(fold_index(2 * int'(s1_j) - 6 + t, int'(m)));
      win[t] = rdata[line];
    end
  end

  // Table address generation: slice k holds bit k of every window sample,
  // grouped by polyphase branch (even and odd samples to separate tables).
  always_comb begin
    for (int k = 0; k < WMAX; k++) begin
      for (int t = 0; t < LE_TAPS; t++) addr[k].le[t] = win[2*t][k];
      for (int t = 0; t < LO_TAPS; t++) addr[k].lo[t] = win[2*t+1][k];
      for (int t = 0; t < HE_TAPS; t++) addr[k].he[t] = win[4+2*t][k];
      addr[k].ho[0] = win[7][k];
    end
  end

  assign out_valid = s1_valid;
  assign out_band  = col_band_e'(s1_pos[0]);
  assign out_col   = AW'(s1_pos >> 1);
  assign out_row   = s1_j[AW-1:0];
  assign done      = active && (j == half) && !s1_valid;

  // A row may only be written while its line is free.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> LW'(in_row) < wr_row_limit);

endmodule
