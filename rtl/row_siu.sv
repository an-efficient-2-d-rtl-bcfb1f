// row_siu: row stream interface unit.
//
// Receives a row of samples two at a time (an even and an odd sample per
// transfer) and keeps them in a short delay line of DEPTH samples, split into
// an even bank and an odd bank (slot = position mod DEPTH). The delay line is
// doubled (one copy per row parity) so that the first pairs of the next row
// can arrive while the last windows of the current row are still formed.
// For every output pair i of a row it presents the 13-sample window at positions 2i-6..2i+6 to
// the row filterbank, folding positions outside the row back into it by
// whole-sample symmetric extension, so no extra samples are ever requested.
//
// Flow: input pairs use valid/ready. Pair p is accepted once it can no longer
// overwrite a sample that a pending window needs (p <= i+4). Operation i
// fires once pair min(i+3, len/2-1) is present and the column SIU allows the
// current row (row < wr_row_limit). Once the current row is complete, up to
// five pairs of the next row (all but its last pair) go into the other copy of
// the delay line, so operation 0 of the next row can fire right after the
// last operation of the current one and the filterbank stays busy across row
// boundaries. op_valid and the addresses
// are combinational outputs, valid for one clock; the row filterbank
// registers them. done rises after the last operation of the last row and
// stays high until the next start.
//
// len is the image side in this octave (rows = columns = len, len >= 4 and a
// power of two). start (one clock) clears the unit and latches len.
//
// Follows the architecture: a 16-sample delay line split into even and odd
// samples that feeds the row filterbank, with the table addresses generated
// in this unit. This design's own choices: the second copy of the delay
// line, the valid/ready handshake, symmetric extension at the row ends, and
// the flow-control rule shared with the column side.
module row_siu
  import dwt_pkg::*;
#(
  parameter int unsigned N     = 512,  // largest image side
  parameter int unsigned WMAX  = 16,   // widest row sample
  parameter int unsigned DEPTH = 16    // delay-line length in samples
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [$clog2(N):0]             len,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic signed [WMAX-1:0]         in_pair [2],
  input  logic [$clog2(N):0]             wr_row_limit,
  output logic                           op_valid,
  output pda_addr_t                      addr [WMAX],
  output logic [$clog2(N)-1:0]           op_row,
  output logic [$clog2(N)-1:0]           op_idx,
  output logic                           done
);

  localparam int unsigned LW = $clog2(N) + 1;
  localparam int unsigned SW = $clog2(DEPTH);

  logic signed [WMAX-1:0] even_bank [2][DEPTH/2];
  logic signed [WMAX-1:0] odd_bank  [2][DEPTH/2];

  logic [LW-1:0] m;        // image side of this octave
  logic [LW-1:0] row;      // row whose windows are being formed
  logic [LW-1:0] idx;      // next operation of that row
  logic [LW-1:0] in_row;   // row now arriving (row or row+1)
  logic [LW-1:0] pairs;    // pairs of in_row received
  logic          active;

  logic [LW-1:0] half, need, op_pairs;
  logic signed [WMAX-1:0] win [WIN];
  logic          accept, fire;

  always_comb begin
    half     = m >> 1;
    need     = (idx + 3 < half) ? idx + 3 : half - 1;  // last pair window idx needs
    op_pairs = (in_row == row) ? pairs : half;         // pairs of row present
    in_ready = active && (in_row < m) &&
               ((in_row == row)     ? (pairs <= idx + 4) :
                (in_row == row + 1) ? (pairs <= 4 && pairs + 1 < half) : 1'b0);
    accept   = in_valid && in_ready;
    fire     = active && (row < m) && (idx < half) && (op_pairs > need) &&
               (row < wr_row_limit);
  end

  // Window read-out with symmetric extension.
  always_comb begin
    logic [SW-1:0] slot;
    for (int t = 0; t < WIN; t++) begin
      slot = SW'(fold_index(2 * int'(idx) - 6 + t, int'(m)));
      win[t] = slot[0] ? odd_bank[row[0]][slot[SW-1:1]] : even_bank[row[0]][slot[SW-1:1]];
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

  assign op_valid = fire;
  assign op_row   = row[LW-2:0];
  assign op_idx   = idx[LW-2:0];
  assign done     = active && (row == m);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m      <= '0;
      row    <= '0;
      in_row <= '0;
      pairs  <= '0;
      idx    <= '0;
      active <= 1'b0;
    end else if (start) begin
      m      <= len;
      row    <= '0;
      in_row <= '0;
      pairs  <= '0;
      idx    <= '0;
      active <= 1'b1;
    end else begin
      if (accept) begin
        if (pairs == half - 1) begin
          pairs  <= '0;
          in_row <= in_row + 1'b1;
        end else begin
          pairs <= pairs + 1'b1;
        end
      end
      if (fire) begin
        if (idx == half - 1) begin
          idx <= '0;
          row <= row + 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  // Delay line: pair p of a row goes to slot (2p mod DEPTH) of the even and
  // odd banks of that row's copy.
  always_ff @(posedge clk) begin
    if (accept) begin
      even_bank[in_row[0]][pairs[SW-2:0]] <= in_pair[0];
      odd_bank[in_row[0]][pairs[SW-2:0]]  <= in_pair[1];
    end
  end

  // Input never runs more than one row ahead of the windows.
  assert property (@(posedge clk) disable iff (!rst_n)
                   active |-> (in_row == row || in_row == row + 1 || row == m));

endmodule
