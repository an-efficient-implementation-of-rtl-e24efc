// polar_kernel: the 2x2 polar kernel F = [[1,0],[1,1]] applied to one bit pair.
//
// (a, b) -> (a XOR b, b). This is the node operation of every stage of the
// encoder: the XOR sits on the upper line and the lower line passes through.
// Purely combinational (the kernel is not pipelined, as in the folded
// architecture this encoder follows), so its outputs are valid in the same
// cycle as its inputs. b_o is a plain copy of b_i: the second column of F
// has a single 1, so synthesis reports that output as wired to an input.
module polar_kernel (
  input  logic a_i,
  input  logic b_i,
  output logic a_o,
  output logic b_o
);

  always_comb begin
    a_o = a_i ^ b_i;
    b_o = b_i;
  end

endmodule
