// eiu: external interface unit between the datapath and off-chip memory.
//
// Input side. In the first octave the unit passes the pixel stream (two
// IN_W-bit unsigned pixels per transfer) to the row SIU, level-shifted to
// signed values by subtracting 2^(IN_W-1). In every later octave it reads the
// previous octave's LL band back from memory, one word (two horizontally
// adjacent coefficients) per clock in raster order, through a small read
// queue that absorbs the one-clock memory latency and row-SIU back-pressure.
//
// Output side. The column filterbank delivers per clock a low-pass and a
// high-pass coefficient of one column of one band (L columns give LL and LH,
// H columns give HL and HH). The unit holds the coefficients of even columns
// and, with those of the following odd column, aligns two adjacent
// coefficients of one sub-band into a memory word {col c+1, col c}, each
// CW bits sign-extended. The four words of a column pair leave through a write
// queue at one word per clock, the rate at which they are produced.
//
// Memory layout (word addresses, N/2 words per image row): sub-bands in the
// usual pyramid arrangement of an N x N coefficient image; the LL band of
// octaves before the last goes to one of two scratch areas behind it
// (SCR0 = N*N/2, SCR1 = SCR0 + N*N/8), alternating per octave, so an octave
// never reads the area it writes. The final LL band goes into the pyramid.
// Memory read data arrives one clock after mem_re. idle is high when no
// coefficient is held in the output path.
//
// Follows the architecture: a single unit between the filters and external
// memory that feeds pixels in the first octave, reads LL back for the later
// ones, and writes the subbands out. This design's own choices: the level
// shift, two coefficients packed per memory word, the pyramid and scratch
// layout, the queue depths, and the one-clock memory read latency.
module eiu
  import dwt_pkg::*;
#(
  parameter int unsigned N       = 512,
  parameter int unsigned IN_W    = 8,
  parameter int unsigned OCTAVES = 3,
  parameter int unsigned RW      = IN_W + 4 * (OCTAVES - 1),  // widest row sample
  parameter int unsigned CW      = IN_W + 4 * OCTAVES,        // widest coefficient
  parameter int unsigned MAW     = 2 * $clog2(N)              // memory word address width
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [1:0]                  oct,
  input  logic                        last,        // this octave is the final one
  input  logic [$clog2(N):0]          len,         // image side in this octave
  // pixel input (first octave)
  input  logic                        pix_valid,
  output logic                        pix_ready,
  input  logic [IN_W-1:0]             pix_data [2],
  // to the row SIU
  output logic                        rs_valid,
  input  logic                        rs_ready,
  output logic signed [RW-1:0]        rs_pair [2],
  // from the column filterbank
  input  logic                        cf_valid,
  input  logic signed [CW-1:0]        cf_lpf,
  input  logic signed [CW-1:0]        cf_hpf,
  input  col_band_e                   cf_band,
  input  logic [$clog2(N)-1:0]        cf_row,
  input  logic [$clog2(N)-1:0]        cf_col,
  // off-chip memory
  output logic                        mem_we,
  output logic [MAW-1:0]              mem_waddr,
  output logic [2*CW-1:0]             mem_wdata,
  output logic                        mem_re,
  output logic [MAW-1:0]              mem_raddr,
  input  logic [2*CW-1:0]             mem_rdata,
  output logic                        idle
);

  localparam int unsigned AW   = $clog2(N);
  localparam int unsigned RQ   = 4;   // read queue entries
  localparam int unsigned WQ   = 8;   // write queue entries
  localparam logic [MAW-1:0] SCR0 = MAW'(N * N / 2);
  localparam logic [MAW-1:0] SCR1 = MAW'(N * N / 2 + N * N / 8);
  localparam logic [MAW-1:0] W2   = MAW'(N / 2);

  typedef struct packed {
    logic [MAW-1:0]  addr;
    logic [2*CW-1:0] data;
  } wr_t;

  // ---------------------------------------------------------------- input side
  logic [MAW-1:0] rd_next, rd_total;
  logic           rd_pending;
  logic [2*CW-1:0] rq [RQ];
  logic [$clog2(RQ):0] rq_cnt;
  logic [$clog2(RQ)-1:0] rq_wp, rq_rp;
  logic           rq_pop;

  assign rd_total = MAW'(len) * MAW'(len) / 2;
  assign mem_raddr = (oct[0] ? SCR0 : SCR1) + rd_next;  // octave k reads area (k-1) mod 2
  assign mem_re = (oct != 2'd0) && (rd_next < rd_total) &&
                  (32'(rq_cnt) + 32'(rd_pending) < RQ);
  assign rq_pop = (oct != 2'd0) && rs_ready && (rq_cnt != 0);

  always_comb begin
    logic [RW-1:0] lo, hi;   // an LL coefficient fits the row-filter width
    lo = rq[rq_rp][RW-1:0];
    hi = rq[rq_rp][CW+RW-1:CW];
    if (oct == 2'd0) begin
      rs_valid   = pix_valid;
      rs_pair[0] = RW'($signed({~pix_data[0][IN_W-1], pix_data[0][IN_W-2:0]}));
      rs_pair[1] = RW'($signed({~pix_data[1][IN_W-1], pix_data[1][IN_W-2:0]}));
    end else begin
      rs_valid   = rq_cnt != 0;
      rs_pair[0] = RW'($signed(lo));
      rs_pair[1] = RW'($signed(hi));
    end
  end
  assign pix_ready = (oct == 2'd0) && rs_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_next    <= '0;
      rd_pending <= 1'b0;
      rq_cnt     <= '0;
      rq_wp      <= '0;
      rq_rp      <= '0;
    end else if (start) begin
      rd_next    <= '0;
      rd_pending <= 1'b0;
      rq_cnt     <= '0;
      rq_wp      <= '0;
      rq_rp      <= '0;
    end else begin
      rd_pending <= mem_re;
      if (mem_re) rd_next <= rd_next + 1'b1;
      if (rd_pending) rq_wp <= rq_wp + 1'b1;
      if (rq_pop) rq_rp <= rq_rp + 1'b1;
      rq_cnt <= rq_cnt + ($clog2(RQ)+1)'(rd_pending) - ($clog2(RQ)+1)'(rq_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (rd_pending) rq[rq_wp] <= mem_rdata;
  end

  // --------------------------------------------------------------- output side
  logic signed [CW-1:0] hold_l [2];   // even-column low-pass output, per band
  logic signed [CW-1:0] hold_h [2];   // even-column high-pass output, per band
  wr_t wq [WQ];
  logic [$clog2(WQ):0] wq_cnt;
  logic [$clog2(WQ)-1:0] wq_wp, wq_rp;
  logic  push;
  wr_t   w_lpf, w_hpf;

  always_comb begin
    logic [MAW-1:0] h, cp, jj;
    h  = MAW'(len >> 1);          // sub-band side
    cp = MAW'(cf_col >> 1);       // word column inside the sub-band
    jj = MAW'(cf_row);
    push = cf_valid && cf_col[0];
    w_lpf.data = {cf_lpf, hold_l[cf_band]};
    w_hpf.data = {cf_hpf, hold_h[cf_band]};
    if (cf_band == BAND_L) begin
      // LL
      if (last)        w_lpf.addr = jj * W2 + cp;
      else if (oct[0]) w_lpf.addr = SCR1 + jj * (h >> 1) + cp;
      else             w_lpf.addr = SCR0 + jj * (h >> 1) + cp;
      // LH
      w_hpf.addr = (jj + h) * W2 + cp;
    end else begin
      // HL
      w_lpf.addr = jj * W2 + (h >> 1) + cp;
      // HH
      w_hpf.addr = (jj + h) * W2 + (h >> 1) + cp;
    end
  end

  assign mem_we    = wq_cnt != 0;
  assign mem_waddr = wq[wq_rp].addr;
  assign mem_wdata = wq[wq_rp].data;
  assign idle      = (wq_cnt == 0) && !cf_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wq_cnt <= '0;
      wq_wp  <= '0;
      wq_rp  <= '0;
    end else begin
      if (push) wq_wp <= wq_wp + 2'd2;
      if (mem_we) wq_rp <= wq_rp + 1'b1;
      wq_cnt <= wq_cnt + (push ? ($clog2(WQ)+1)'(2) : '0) - ($clog2(WQ)+1)'(mem_we);
    end
  end

  always_ff @(posedge clk) begin
    if (cf_valid && !cf_col[0]) begin
      hold_l[cf_band] <= cf_lpf;
      hold_h[cf_band] <= cf_hpf;
    end
    if (push) begin
      wq[wq_wp]        <= w_lpf;
      wq[wq_wp + 1'b1] <= w_hpf;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> 32'(wq_cnt) <= WQ - 2);
  assert property (@(posedge clk) disable iff (!rst_n) rd_pending |-> 32'(rq_cnt) < RQ);

endmodule
