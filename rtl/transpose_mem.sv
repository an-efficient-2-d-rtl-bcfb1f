// transpose_mem: line memory of the column SIU with resource cycling.
//
// LINES line memories, each N words of TW bits, i.e. a fixed LINES*N*TW bits
// of storage. In octave k (0-based) a line holds only N/2^k samples, so each
// sample gets 2^k words (2^k*TW bits) instead of one: the storage freed by the
// shrinking lines carries the growing word length (TW+4k bits in octave k)
// instead of lying idle. Sample s of a line occupies words s*2^k .. s*2^k+2^k-1,
// least significant word first; a read sign-extends from bit 2^k*TW-1.
//
// Write port: two adjacent samples (positions wpos, wpos+1; wpos even) of one
// line per clock. Read port: one sample position of all LINES lines per clock,
// registered (rdata valid the clock after re). Reading and writing the same
// words in one clock returns the old contents. oct must stay constant while an
// octave is processed.
//
// Follows the architecture: 16 lines of N 10-bit words, where a sample of
// octave k spreads over 2^k adjacent words, so the same storage serves every
// octave. This design's own choices: two samples written per clock, a
// registered read of all lines at one position, and sign extension of the
// narrower samples.
module transpose_mem #(
  parameter int unsigned N       = 512,  // words per line
  parameter int unsigned LINES   = 16,   // line memories
  parameter int unsigned TW      = 10,   // word width = first-octave sample width
  parameter int unsigned OCTAVES = 3,
  parameter int unsigned SMAX    = TW + 4 * (OCTAVES - 1)  // widest sample
) (
  input  logic                          clk,
  input  logic [1:0]                    oct,
  input  logic                          we,
  input  logic [$clog2(LINES)-1:0]      wline,
  input  logic [$clog2(N)-1:0]          wpos,
  input  logic signed [SMAX-1:0]        wdata [2],
  input  logic                          re,
  input  logic [$clog2(N)-1:0]          rpos,
  output logic signed [SMAX-1:0]        rdata [LINES]
);

  localparam int unsigned AW   = $clog2(N);
  localparam int unsigned SPAN = 2 ** (OCTAVES - 1);  // most words per sample
  localparam int unsigned XW   = SPAN * TW;

  logic [TW-1:0] mem [LINES][N];

  logic [AW-1:0] span;
  assign span = AW'(1) << oct;

  always_ff @(posedge clk) begin
    if (we) begin
      for (int s = 0; s < 2; s++) begin
        logic [XW-1:0] ext;
        ext = XW'(wdata[s]);
        if (XW > SMAX) ext = {{(XW-SMAX){wdata[s][SMAX-1]}}, wdata[s]};
        for (int j = 0; j < SPAN; j++)
          if (j < int'(span))
            mem[wline][AW'((int'(wpos) + s) * int'(span) + j)] <= ext[j*TW +: TW];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (re) begin
      for (int l = 0; l < LINES; l++) begin
        logic [XW-1:0] cat;
        cat = '0;
        for (int j = 0; j < SPAN; j++)
          if (j < int'(span))
            cat[j*TW +: TW] = mem[l][AW'(int'(rpos) * int'(span) + j)];
        // sign-extend from the top bit of the words in use
        for (int b = 0; b < XW; b++)
          if (b >= int'(span) * int'(TW)) cat[b] = cat[int'(span) * int'(TW) - 1];
        rdata[l] <= SMAX'(cat);
      end
    end
  end

endmodule
