// polar_fold_stage: one folded stage of the P-parallel polar encoder.
//
// A folded stage combines bits whose indices differ by D = L*P, i.e. bits
// that arrive L beats apart on the same line. It holds P/2 kernel units;
// unit k reads lines 2k (upper) and 2k+1 (lower) and time-multiplexes all
// the kernel operations of its folding set over a window of 2L beats:
//
//   R1  delay line of L registers on the lower input line
//   R2  delay line of L registers in front of the kernel's upper input,
//       loaded from the upper line (sel_i = 0) or from R1 (sel_i = 1)
//   kernel upper input = R2 output
//   kernel lower input = upper line (sel_i = 1) or R1 output (sel_i = 0)
//
// During the first L beats of a window (sel_i = 0) the upper line is parked
// in R2 and the lower line in R1. During the last L beats (sel_i = 1) the
// kernel pairs each parked upper-line bit with the upper-line bit arriving
// L beats later, while R1's bits move into R2. During the following L
// cycles (sel_i = 0 again, either the next window or idle) the kernel pairs
// those bits with the lower-line bits still leaving R1. So the stream
// leaves the stage L cycles after it entered, still one beat per cycle,
// with each output line pair holding (a XOR b, b) for one pair (i, i+D).
// For the 16-bit, 4-parallel encoder stage 3 has L = 1 (registers R1..R4 of
// the reference architecture) and stage 4 has L = 2 (R5..R12); the select
// encoding and the general L are this design's own.
//
// Interface: d_i[l], d_o[l] are line l; sel_i comes from polar_fold_ctrl.
// Timing: kernel outputs are combinational from the registers and d_i;
// the delay registers shift on every clock edge; synchronous active-low
// reset clears them.
module polar_fold_stage #(
  parameter int unsigned P = 4,  // lines, two per kernel unit
  parameter int unsigned L = 1   // registers per delay line (beats between partners)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sel_i,
  input  logic [P-1:0] d_i,
  output logic [P-1:0] d_o
);

  localparam int unsigned U = P / 2;

  logic [L-1:0] r1_q [U];
  logic [L-1:0] r2_q [U];
  logic [U-1:0] r1_out, r2_out, r2_in, k_a, k_b;

  for (genvar k = 0; k < U; k++) begin : g_unit
    assign r1_out[k] = r1_q[k][L-1];
    assign r2_out[k] = r2_q[k][L-1];

    always_comb begin
      r2_in[k] = sel_i ? r1_out[k] : d_i[2*k];
      k_a[k]   = r2_out[k];
      k_b[k]   = sel_i ? d_i[2*k] : r1_out[k];
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        r1_q[k] <= '0;
        r2_q[k] <= '0;
      end else begin
        r1_q[k] <= L'({r1_q[k], d_i[2*k+1]});
        r2_q[k] <= L'({r2_q[k], r2_in[k]});
      end
    end

    polar_kernel u_kernel (
      .a_i (k_a[k]),
      .b_i (k_b[k]),
      .a_o (d_o[2*k]),
      .b_o (d_o[2*k+1])
    );
  end

endmodule
