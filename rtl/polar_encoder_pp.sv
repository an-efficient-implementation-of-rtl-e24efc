// polar_encoder_pp: P-parallel folded (partially parallel) polar encoder.
//
// Computes the polar codeword x = u * G_N, G_N being the n-fold Kronecker
// power of the kernel F = [[1,0],[1,1]] (N = 2^n), with x delivered in
// bit-reversed order. A fully parallel encoder needs (N/2)*log2(N) kernels;
// this one folds the computation onto P/2 kernels per stage by feeding u in
// P bits per clock:
//
//   stages 1 .. log2(P)      polar_par_stages: pairs inside one beat,
//                            plain XOR kernels, no registers
//   stages log2(P)+1 .. n    polar_fold_stage with L = 1, 2, 4, .. N/(2P):
//                            pairs L beats apart, met through delay lines
//                            and multiplexers (delay commutators)
//   polar_fold_ctrl          beat counter giving every folded stage its
//                            multiplexer select and the output its flags
//
// Defaults N = 16, P = 4 give the 4-parallel architecture for (16,k) codes:
// two kernels per stage, stage 3 with one-register delays, stage 4 with
// two-register delays, 12 delay registers in all.
//
// Input: in_valid with u_in[j] = u[P*t + j] for beat t = 0 .. N/P-1 of a
// codeword, beats back to back; frozen positions of u must already be 0.
// Codewords may follow each other without a gap, or with idle cycles.
// Output: N/P - 1 cycles after the first input beat (3 cycles for 16/4)
// out_valid rises for N/P consecutive beats. At output beat k, x_out line
// 2m+o (m = kernel unit, o = 0 upper / 1 lower) holds
//   row r = (P/2)*k + bitrev(m, log2(P)-1) + (N/2)*o  of  v = u * F^(x)n,
// and v[r] = x[bitrev(r, n)]. For 16/4: beat 0 gives x0 x1 x8 x9, beat 1
// x4 x5 x12 x13, beat 2 x2 x3 x10 x11, beat 3 x6 x7 x14 x15: each kernel
// of the last stage yields two consecutive codeword bits.
// Throughput: P codeword bits per clock. The handshake, the flags and the
// general N and P are this design's own choices; the structure for 16/4
// follows the reference architecture.
module polar_encoder_pp #(
  parameter int unsigned N = 16,  // code length, a power of two
  parameter int unsigned P = 4    // parallelism, a power of two, 2 <= P < N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [P-1:0] u_in,
  output logic         out_valid,
  output logic         out_first,
  output logic         out_last,
  output logic [P-1:0] x_out
);

  import polar_pkg::*;

  localparam int unsigned NF = $clog2(N / P);  // folded stages

  logic [NF-1:0] sel;
  logic [P-1:0]  line [NF+1];  // line[f]: input of folded stage f

  polar_par_stages #(.P(P)) u_par (
    .u_i (u_in),
    .v_o (line[0])
  );

  polar_fold_ctrl #(.N(N), .P(P)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (in_valid),
    .sel_o   (sel),
    .valid_o (out_valid),
    .first_o (out_first),
    .last_o  (out_last)
  );

  for (genvar f = 0; f < NF; f++) begin : g_fold
    polar_fold_stage #(.P(P), .L(fold_delay(f))) u_stage (
      .clk   (clk),
      .rst_n (rst_n),
      .sel_i (sel[f]),
      .d_i   (line[f]),
      .d_o   (line[f+1])
    );
  end

  assign x_out = line[NF];

endmodule
