// pda_filterbank: low-pass/high-pass analysis filter pair in parallel
// distributed arithmetic (PDA) with polyphase decomposition.
//
// One operation per clock. The stream interface unit in front cuts the
// 13-sample window w[0..12] (see dwt_pkg) into bit slices and delivers them as
// table addresses: for every input bit position k, the k-th bits of the
// samples of one polyphase branch address a look-up table that holds every
// partial sum of that branch's taps. A low-pass output uses a 2^7-entry
// even-phase table and a 2^6-entry odd-phase table, a high-pass output a
// 2^4-entry and a 2^1-entry table, instead of one 2^13-entry table per filter.
// The per-bit table outputs are summed, each shifted by its bit weight, with
// the sign-bit slice subtracted (two's complement weighting, equivalent to a
// Baugh-Wooley reduction tree). All tables of a branch hold the same values;
// they are generated from the tap list at elaboration time.
//
// Word length is set at run time by act_w: the filter then uses only the
// lowest act_w bit slices and treats bit act_w-1 as the sign. This stands in
// for re-configuring the module with more look-up tables and a wider reduction
// tree in each higher octave. The samples behind the addresses must be act_w-bit
// values sign-extended to WMAX bits. The outputs are the filter sums floored to integers (the FRAC
// fraction bits dropped) and are act_w+2 bits wide, sign-extended to
// WMAX+GROW; no saturation is needed because the summed tap magnitude is below
// 4.
//
// Timing: in_valid/addr/tag registered to out_valid/lpf/hpf/out_tag one clock
// later. No back-pressure: the module never stalls.
//
// Follows the architecture: parallel distributed arithmetic with one set of
// look-up tables per input bit, each filter split into its even and odd taps
// (tables of 2^7 and 2^6 entries for the low-pass, 2^4 and 2^1 for the high-
// pass), and the active word length chosen per octave. This design's own
// choices: the table contents (computed from the chosen taps), two's
// complement handled by subtracting the sign-bit slice, one output register,
// and rounding by truncation toward minus infinity.
module pda_filterbank
  import dwt_pkg::*;
#(
  parameter int unsigned WMAX  = 16,  // widest input sample the module is built for
  parameter int unsigned TAG_W = 1    // side information carried along with an operation
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [4:0]                    act_w,     // active input width, 2..WMAX
  input  logic                          in_valid,
  input  pda_addr_t                     addr [WMAX],
  input  logic [TAG_W-1:0]              in_tag,
  output logic                          out_valid,
  output logic signed [WMAX+GROW-1:0]   lpf,
  output logic signed [WMAX+GROW-1:0]   hpf,
  output logic [TAG_W-1:0]              out_tag
);

  localparam int unsigned ROM_W = 16;
  localparam int unsigned ACC_W = WMAX + ROM_W + 4;

  typedef logic signed [ROM_W-1:0] rom_t;

  // Partial-sum table of one polyphase branch: entry a = sum of the taps whose
  // address bit is set. first/step pick the branch's taps out of a tap list.
  function automatic rom_t rom_entry(input tap_t taps [WIN], input int first,
                                     input int step, input int n, input int a);
    int s;
    s = 0;
    for (int t = 0; t < n; t++)
      if (a[t]) s += int'(taps[first + step*t]);
    return rom_t'(s);
  endfunction

  rom_t le_rom [2**LE_TAPS];
  rom_t lo_rom [2**LO_TAPS];
  rom_t he_rom [2**HE_TAPS];
  rom_t ho_rom [2**HO_TAPS];

  // Look-up tables: constant contents, generated from the tap lists.
  always_comb begin
    for (int a = 0; a < 2**LE_TAPS; a++) le_rom[a] = rom_entry(LPF_TAPS, 0, 2, LE_TAPS, a);
    for (int a = 0; a < 2**LO_TAPS; a++) lo_rom[a] = rom_entry(LPF_TAPS, 1, 2, LO_TAPS, a);
    for (int a = 0; a < 2**HE_TAPS; a++) he_rom[a] = rom_entry(HPF_TAPS, 4, 2, HE_TAPS, a);
    for (int a = 0; a < 2**HO_TAPS; a++) ho_rom[a] = rom_entry(HPF_TAPS, 7, 1, HO_TAPS, a);
  end

  logic signed [ACC_W-1:0] acc_l, acc_h;

  // Bit-slice look-up and reduction.
  always_comb begin
    logic signed [ACC_W-1:0] pl, ph;
    acc_l = '0;
    acc_h = '0;
    for (int k = 0; k < WMAX; k++) begin
      pl = (ACC_W'(le_rom[addr[k].le]) + ACC_W'(lo_rom[addr[k].lo])) <<< k;
      ph = (ACC_W'(he_rom[addr[k].he]) + ACC_W'(ho_rom[addr[k].ho])) <<< k;
      if (k + 1 < int'(act_w)) begin
        acc_l += pl;
        acc_h += ph;
      end else if (k + 1 == int'(act_w)) begin
        acc_l -= pl;
        acc_h -= ph;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      lpf       <= '0;
      hpf       <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        lpf     <= (WMAX+GROW)'(acc_l >>> FRAC);
        hpf     <= (WMAX+GROW)'(acc_h >>> FRAC);
        out_tag <= in_tag;
      end
    end
  end

endmodule
