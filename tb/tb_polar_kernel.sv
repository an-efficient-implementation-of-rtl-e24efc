// tb_polar_kernel: exhaustive test of the 2x2 polar kernel.
// For each of the four input pairs (a, b) it expects (a XOR b, b), the
// product of the row vector (a, b) with F = [[1,0],[1,1]] over GF(2).
module tb_polar_kernel;
  logic a, b, ao, bo;
  int checks = 0, failures = 0;

  polar_kernel dut (.a_i(a), .b_i(b), .a_o(ao), .b_o(bo));

  // F written out as a matrix: out[c] = XOR_r in[r] & F[r][c]
  localparam bit F [2][2] = '{'{1'b1, 1'b0}, '{1'b1, 1'b1}};

  initial begin
    for (int v = 0; v < 4; v++) begin
      bit in0, in1, e0, e1;
      in0 = v[1]; in1 = v[0];
      e0 = (in0 & F[0][0]) ^ (in1 & F[1][0]);
      e1 = (in0 & F[0][1]) ^ (in1 & F[1][1]);
      a = in0; b = in1;
      #1;
      checks += 2;
      if (ao !== e0) begin failures++; $display("FAIL a=%b b=%b a_o=%b", a, b, ao); end
      if (bo !== e1) begin failures++; $display("FAIL a=%b b=%b b_o=%b", a, b, bo); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
