// polar_par_stages: the fully parallel stages of the P-parallel folded
// polar encoder (stages 1 and 2 when P = 4).
//
// A beat of P input bits u[Pt+0 .. Pt+P-1] holds every pair that the first
// log2(P) encoding stages combine, so those stages need no folding: each is
// P/2 polar kernels working side by side in the same clock cycle. Stage s
// (s = 1 .. log2 P) pairs lanes j and j + 2^(s-1).
//
// Line order at the output: line l carries lane bitrev(l). For P = 4 this
// is the order [0, 2, 1, 3] produced by the line crossing between stages 1
// and 2 in the reference architecture, and it is the order the folded
// stages expect (unit k of the next stage reads lines 2k and 2k+1). For
// other P the same bit-reversed order is this design's own generalisation.
//
// Interface: u_i[j] is lane j (natural order); v_o[l] is line l.
// Timing: combinational, no registers. Lane P-1 takes part in no XOR
// (it is the lower input of every kernel it meets), so the last line is a
// copy of u_i[P-1].
module polar_par_stages
  import polar_pkg::*;
#(
  parameter int unsigned P = 4  // bits per beat, a power of two >= 2
) (
  input  logic [P-1:0] u_i,
  output logic [P-1:0] v_o
);

  localparam int unsigned NS = $clog2(P);

  // stage_q[s] is the value on every lane after s stages (natural lane order)
  logic [P-1:0] stage_q [NS+1];

  assign stage_q[0] = u_i;

  for (genvar s = 0; s < NS; s++) begin : g_stage
    localparam int unsigned DIST = 1 << s;
    for (genvar j = 0; j < P; j++) begin : g_lane
      if ((j & DIST) == 0) begin : g_node
        polar_kernel u_kernel (
          .a_i (stage_q[s][j]),
          .b_i (stage_q[s][j+DIST]),
          .a_o (stage_q[s+1][j]),
          .b_o (stage_q[s+1][j+DIST])
        );
      end
    end
  end

  for (genvar l = 0; l < P; l++) begin : g_line
    assign v_o[l] = stage_q[NS][bitrev(l, NS)];
  end

endmodule
