// tb_polar_par_stages: exhaustive test of the fully parallel stages for
// P = 4 (the default) and P = 8.
// Expected lane values come from the Kronecker power of F: lane r gets the
// XOR of u[i] over every i whose binary digits include those of r. The
// expected line order is written out as a table: [0,2,1,3] for P = 4 (the
// crossing between stages 1 and 2) and [0,4,2,6,1,5,3,7] for P = 8.
module tb_polar_par_stages;
  logic [3:0] u4, v4;
  logic [7:0] u8, v8;
  int checks = 0, failures = 0;

  localparam int unsigned ORD4 [4] = '{0, 2, 1, 3};
  localparam int unsigned ORD8 [8] = '{0, 4, 2, 6, 1, 5, 3, 7};

  polar_par_stages dut4 (.u_i(u4), .v_o(v4));
  polar_par_stages #(.P(8)) dut8 (.u_i(u8), .v_o(v8));

  function automatic bit lane_ref(logic [7:0] u, int unsigned r, int unsigned p);
    bit acc = 0;
    for (int unsigned i = 0; i < p; i++)
      if ((i & r) == r) acc ^= u[i];
    return acc;
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      u4 = v[3:0];
      u8 = v[7:0];
      #1;
      if (v < 16) begin
        for (int l = 0; l < 4; l++) begin
          checks++;
          if (v4[l] !== lane_ref({4'b0, u4}, ORD4[l], 4)) begin
            failures++;
            $display("FAIL P=4 u=%b line %0d", u4, l);
          end
        end
      end
      for (int l = 0; l < 8; l++) begin
        checks++;
        if (v8[l] !== lane_ref(u8, ORD8[l], 8)) begin
          failures++;
          $display("FAIL P=8 u=%b line %0d", u8, l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
