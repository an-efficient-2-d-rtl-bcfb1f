// dwt2d_top: separable 2-D discrete wavelet transform with resource cycling.
//
// Datapath (left to right): EIU -> row SIU -> row PDA filterbank -> column SIU
// (with transpose memory) -> column PDA filterbank -> EIU -> off-chip memory.
// One row-filter and one column-filter operation per clock; the row side
// consumes two samples per clock, the column side produces two coefficients
// per clock. The octaves are scheduled one after the other (blocking): octave
// 0 takes the N x N image from the pixel port, each later octave reads the LL
// band of the previous one back from memory. Per octave the controller
// widens both filterbanks by 4 bits (row: IN_W+4k, column: IN_W+4k+2 bits),
// while the transpose memory keeps its size and re-packs its shrinking lines
// into wider samples.
//
// Interfaces: go starts a transform (N, OCTAVES fixed by parameters), done
// pulses at its end. Pixels arrive in raster order two per transfer
// (pix_data[0] the even column) with valid/ready. The memory port is a simple
// dual-port interface with one-clock read latency; words hold two
// horizontally adjacent coefficients of one sub-band, CW = IN_W + 4*OCTAVES
// bits each, laid out as described in eiu.sv. Requires N/2^(OCTAVES-1) >= 4.
//
// The block chain, the shared row and column filterbanks, blocking octave
// scheduling and the 8/10, 12/14, 16/18-bit word lengths follow the
// architecture as published. The pixel and memory interfaces, word format,
// edge handling and the instantaneous width switch (no reconfiguration time)
// are choices of this design.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int unsigned N       = 512,
  parameter int unsigned OCTAVES = 3,
  parameter int unsigned IN_W    = 8,
  localparam int unsigned CW     = IN_W + 4 * OCTAVES,
  localparam int unsigned MAW    = 2 * $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                go,
  output logic                busy,
  output logic                done,
  output logic [1:0]          octave,
  input  logic                pix_valid,
  output logic                pix_ready,
  input  logic [IN_W-1:0]     pix_data [2],
  output logic                mem_we,
  output logic [MAW-1:0]      mem_waddr,
  output logic [2*CW-1:0]     mem_wdata,
  output logic                mem_re,
  output logic [MAW-1:0]      mem_raddr,
  input  logic [2*CW-1:0]     mem_rdata
);

  localparam int unsigned AW  = $clog2(N);
  localparam int unsigned RW  = IN_W + 4 * (OCTAVES - 1);  // widest row-filter input
  localparam int unsigned TW  = IN_W + GROW;               // first-octave column sample
  localparam int unsigned KW  = TW + 4 * (OCTAVES - 1);    // widest column-filter input

  logic          start, last, col_done, eiu_idle;
  logic [AW:0]   len;
  logic [4:0]    row_w, col_w;

  // EIU -> row SIU
  logic                  rs_valid, rs_ready;
  logic signed [RW-1:0]  rs_pair [2];
  // row SIU -> row filterbank
  logic                  rop_valid;
  pda_addr_t             raddr [RW];
  logic [AW-1:0]         rop_row, rop_idx;
  logic [AW:0]           wr_row_limit;
  logic                  row_done;
  // row filterbank -> column SIU
  logic                  rf_valid;
  logic signed [RW+GROW-1:0] rf_lpf, rf_hpf;
  logic [2*AW-1:0]       rf_tag;
  // column SIU -> column filterbank
  logic                  cop_valid;
  pda_addr_t             caddr [KW];
  col_band_e             cop_band;
  logic [AW-1:0]         cop_row, cop_col;
  // column filterbank -> EIU
  logic                  cf_valid;
  logic signed [KW+GROW-1:0] cf_lpf, cf_hpf;
  logic [2*AW:0]         cf_tag;

  dwt_ctrl #(.N(N), .IN_W(IN_W), .OCTAVES(OCTAVES)) u_ctrl (
    .clk, .rst_n, .go,
    .row_done (row_done),
    .col_done (col_done),
    .eiu_idle (eiu_idle),
    .busy, .done, .start,
    .oct      (octave),
    .last, .len, .row_w, .col_w
  );

  eiu #(.N(N), .IN_W(IN_W), .OCTAVES(OCTAVES), .RW(RW), .CW(CW), .MAW(MAW)) u_eiu (
    .clk, .rst_n, .start,
    .oct       (octave),
    .last, .len,
    .pix_valid, .pix_ready, .pix_data,
    .rs_valid, .rs_ready, .rs_pair,
    .cf_valid,
    .cf_lpf    (CW'(cf_lpf)),
    .cf_hpf    (CW'(cf_hpf)),
    .cf_band   (col_band_e'(cf_tag[2*AW])),
    .cf_row    (cf_tag[2*AW-1:AW]),
    .cf_col    (cf_tag[AW-1:0]),
    .mem_we, .mem_waddr, .mem_wdata, .mem_re, .mem_raddr, .mem_rdata,
    .idle      (eiu_idle)
  );

  row_siu #(.N(N), .WMAX(RW)) u_row_siu (
    .clk, .rst_n, .start, .len,
    .in_valid     (rs_valid),
    .in_ready     (rs_ready),
    .in_pair      (rs_pair),
    .wr_row_limit (wr_row_limit),
    .op_valid     (rop_valid),
    .addr         (raddr),
    .op_row       (rop_row),
    .op_idx       (rop_idx),
    .done         (row_done)
  );

  pda_filterbank #(.WMAX(RW), .TAG_W(2*AW)) u_row_fb (
    .clk, .rst_n,
    .act_w     (row_w),
    .in_valid  (rop_valid),
    .addr      (raddr),
    .in_tag    ({rop_row, rop_idx}),
    .out_valid (rf_valid),
    .lpf       (rf_lpf),
    .hpf       (rf_hpf),
    .out_tag   (rf_tag)
  );

  col_siu #(.N(N), .LINES(16), .TW(TW), .OCTAVES(OCTAVES), .WMAX(KW)) u_col_siu (
    .clk, .rst_n, .start, .len,
    .oct          (octave),
    .in_valid     (rf_valid),
    .in_lpf       (KW'(rf_lpf)),
    .in_hpf       (KW'(rf_hpf)),
    .in_row       (rf_tag[2*AW-1:AW]),
    .in_idx       (rf_tag[AW-1:0]),
    .wr_row_limit (wr_row_limit),
    .out_valid    (cop_valid),
    .addr         (caddr),
    .out_band     (cop_band),
    .out_row      (cop_row),
    .out_col      (cop_col),
    .done         (col_done)
  );

  pda_filterbank #(.WMAX(KW), .TAG_W(2*AW+1)) u_col_fb (
    .clk, .rst_n,
    .act_w     (col_w),
    .in_valid  (cop_valid),
    .addr      (caddr),
    .in_tag    ({cop_band, cop_row, cop_col}),
    .out_valid (cf_valid),
    .lpf       (cf_lpf),
    .hpf       (cf_hpf),
    .out_tag   (cf_tag)
  );

endmodule
