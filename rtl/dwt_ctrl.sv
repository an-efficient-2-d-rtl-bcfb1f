// dwt_ctrl: blocking octave scheduler and word-length configuration.
//
// On go the controller runs the octaves one after the other: octave k works
// on the (N/2^k) x (N/2^k) image (the input image, then the LL band of the
// previous octave) and starts only when octave k-1 has completely finished
// and its last coefficient word has left the EIU, so new input is blocked
// while the higher octaves are decomposed. Between octaves it switches the
// datapath to the next configuration: the row filterbank processes
// IN_W + 4k bit samples and the column filterbank IN_W + 4k + 2 bit samples
// in octave k (8/10, 12/14, 16/18 bits for 8-bit pixels). The switch takes
// effect in one clock; there is no reconfiguration delay.
//
// start is a one-clock pulse at the beginning of every octave that clears the
// SIUs and the EIU input side. done is a one-clock pulse after the last
// octave; busy is high from go to done.
//
// Follows the architecture: octaves run one after another (blocking
// scheduling), and the filters change to the next octave's word length in
// between. This design's own choices: the state machine, the start and done
// pulses, and the word-length change made in one clock instead of by loading
// a new configuration.
module dwt_ctrl
  import dwt_pkg::*;
#(
  parameter int unsigned N       = 512,
  parameter int unsigned IN_W    = 8,
  parameter int unsigned OCTAVES = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   go,
  input  logic                   row_done,   // row SIU has issued its last operation
  input  logic                   col_done,   // column SIU has sent its last window
  input  logic                   eiu_idle,   // nothing left in the EIU output path
  output logic                   busy,
  output logic                   done,
  output logic                   start,
  output logic [1:0]             oct,
  output logic                   last,
  output logic [$clog2(N):0]     len,
  output logic [4:0]             row_w,
  output logic [4:0]             col_w
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_RUN} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      oct   <= '0;
      len   <= ($clog2(N)+1)'(N);
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (go) begin
          oct   <= '0;
          len   <= ($clog2(N)+1)'(N);
          state <= S_START;
        end
        S_START: state <= S_RUN;
        S_RUN: if (row_done && col_done && eiu_idle) begin
          if (32'(oct) == OCTAVES - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            oct   <= oct + 1'b1;
            len   <= len >> 1;
            state <= S_START;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign start = state == S_START;
  assign busy  = state != S_IDLE;
  assign last  = 32'(oct) == OCTAVES - 1;
  assign row_w = 5'(row_width(IN_W, 32'(oct)));
  assign col_w = 5'(col_width(IN_W, 32'(oct)));

endmodule
