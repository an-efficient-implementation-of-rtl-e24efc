// polar_fold_ctrl: schedule control of the folded polar encoder.
//
// A codeword of N bits enters as B = N/P beats of P bits in consecutive
// cycles. This block counts the beats of each codeword and carries the
// (valid, beat number) pair down a delay line that follows the data through
// the folded stages. Folded stage f (f = 0 .. log2(B)-1) has delay lines of
// 2^f registers and sees the stream 2^f - 1 cycles after the input, so its
// multiplexer select is bit f of the beat number found there: 0 in the first
// half of each 2^(f+1)-beat window, 1 in the second half. Cycles without a
// beat give select 0, which lets the delay lines drain the last codeword.
// The stream leaves the last stage B-1 cycles after it entered; valid_o,
// first_o and last_o mark the output beats at that point.
// The reference architecture draws the multiplexers but not their control;
// this counter-and-delay-line scheme is this design's own.
//
// Interface: valid_i is high for each input beat; sel_o[f] drives folded
// stage f. Timing: sel_o[0] and the outputs for a delay of 0 are
// combinational from valid_i; everything else comes from registers.
// Synchronous active-low reset restarts the beat count and clears the
// delay line.
module polar_fold_ctrl #(
  parameter int unsigned N = 16,  // code length
  parameter int unsigned P = 4    // bits per beat, P < N
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     valid_i,
  output logic [$clog2(N/P)-1:0]   sel_o,
  output logic                     valid_o,
  output logic                     first_o,
  output logic                     last_o
);

  localparam int unsigned B   = N / P;        // beats per codeword
  localparam int unsigned NF  = $clog2(B);    // folded stages
  localparam int unsigned LAT = B - 1;        // cycles from input to output

  typedef struct packed {
    logic          valid;
    logic [NF-1:0] beat;
  } tag_t;

  logic [NF-1:0] beat_q;
  tag_t          tag [LAT+1];   // tag[d]: the input of d cycles ago

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beat_q <= '0;
    end else if (valid_i) begin
      beat_q <= (beat_q == NF'(B - 1)) ? '0 : beat_q + 1'b1;
    end
  end

  // The beats of one codeword must be back to back: the folded stages pair
  // bits by their distance in cycles.
  a_beats_back_to_back: assert property (
    @(posedge clk) disable iff (!rst_n) (beat_q != '0) |-> valid_i
  ) else $error("polar_fold_ctrl: gap inside a codeword");

  assign tag[0] = '{valid: valid_i, beat: beat_q};

  for (genvar d = 1; d <= LAT; d++) begin : g_delay
    always_ff @(posedge clk) begin
      if (!rst_n) tag[d] <= '0;
      else        tag[d] <= tag[d-1];
    end
  end

  for (genvar f = 0; f < NF; f++) begin : g_sel
    localparam int unsigned D = (1 << f) - 1;
    assign sel_o[f] = tag[D].valid & tag[D].beat[f];
  end

  assign valid_o = tag[LAT].valid;
  assign first_o = tag[LAT].valid && (tag[LAT].beat == '0);
  assign last_o  = tag[LAT].valid && (tag[LAT].beat == NF'(B - 1));

endmodule
