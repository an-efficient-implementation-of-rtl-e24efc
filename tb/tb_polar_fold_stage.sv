// tb_polar_fold_stage: tests one folded stage with L = 1 and L = 2 (the two
// folded stages of the 16-bit, 4-parallel encoder), P = 4.
// A random stream of beats is fed with the select high in the second half
// of every 2L-beat window, as the controller drives it. Seen from outside,
// a window of 2L input beats with upper line a and lower line b must come
// out starting L cycles later as L beats of (a[t]^a[t+L], a[t+L]) followed
// by L beats of (b[t]^b[t+L], b[t+L]), t running over the first half of
// the window, on both kernel units. The expected values are built from a
// record of the inputs. Idle beats (select 0) are inserted between runs of
// windows to check that the delay lines drain.
module tb_polar_fold_stage;
  localparam int unsigned P = 4;
  localparam int unsigned NBEAT = 2000;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic       sel1, sel2;
  logic [3:0] d1, d2, q1, q2;

  polar_fold_stage #(.P(4), .L(1)) dut1 (.clk, .rst_n, .sel_i(sel1), .d_i(d1), .d_o(q1));
  polar_fold_stage #(.P(4), .L(2)) dut2 (.clk, .rst_n, .sel_i(sel2), .d_i(d2), .d_o(q2));

  // input record per cycle; win_start[c] = first cycle of the window the
  // beat of cycle c belongs to, -1 for an idle cycle
  logic [3:0] rec [2][NBEAT*2];
  int         wstart [2][NBEAT*2];
  int         cyc = 0;

  function automatic logic [3:0] expect_out(int s, int c, int L, output bit known);
    // which window's output is due at cycle c?
    logic [3:0] e;
    int t0, q, ta;
    known = 0;
    e = '0;
    for (int w = c - 3 * L + 1; w <= c - L; w++) begin
      if (w >= 0 && wstart[s][w] == w) begin
        t0 = w;
        q = c - L - t0;             // 0 .. 2L-1
        if (q < L) begin
          ta = t0 + q;
          for (int k = 0; k < 2; k++) begin
            e[2*k]   = rec[s][ta][2*k] ^ rec[s][ta+L][2*k];
            e[2*k+1] = rec[s][ta+L][2*k];
          end
        end else begin
          ta = t0 + q - L;
          for (int k = 0; k < 2; k++) begin
            e[2*k]   = rec[s][ta][2*k+1] ^ rec[s][ta+L][2*k+1];
            e[2*k+1] = rec[s][ta+L][2*k+1];
          end
        end
        known = 1;
      end
    end
    return e;
  endfunction

  int pos1 = -1, pos2 = -1;   // beat position in current window, -1 idle
  int start1 = 0, start2 = 0;

  initial begin
    for (int i = 0; i < NBEAT * 2; i++) begin
      wstart[0][i] = -1; wstart[1][i] = -1;
    end
    sel1 = 0; sel2 = 0; d1 = '0; d2 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < NBEAT; cyc++) begin
      @(negedge clk);
      // stream 1 (L = 1)
      if (pos1 < 0 && $urandom_range(0, 3) != 0) begin pos1 = 0; start1 = cyc; end
      if (pos1 >= 0) begin
        d1 = 4'($urandom);
        sel1 = (pos1 >= 1);
        rec[0][cyc] = d1;
        wstart[0][cyc] = start1;
        pos1 = (pos1 == 1) ? -1 : pos1 + 1;
      end else begin
        d1 = 4'($urandom); sel1 = 0; rec[0][cyc] = d1;
      end
      // stream 2 (L = 2)
      if (pos2 < 0 && $urandom_range(0, 3) != 0) begin pos2 = 0; start2 = cyc; end
      if (pos2 >= 0) begin
        d2 = 4'($urandom);
        sel2 = (pos2 >= 2);
        rec[1][cyc] = d2;
        wstart[1][cyc] = start2;
        pos2 = (pos2 == 3) ? -1 : pos2 + 1;
      end else begin
        d2 = 4'($urandom); sel2 = 0; rec[1][cyc] = d2;
      end
      #1;
      begin
        bit k1, k2;
        logic [3:0] e1, e2;
        e1 = expect_out(0, cyc, 1, k1);
        e2 = expect_out(1, cyc, 2, k2);
        if (k1) begin
          checks++;
          if (q1 !== e1) begin failures++; if (failures < 10) $display("FAIL L=1 cyc %0d got %b want %b", cyc, q1, e1); end
        end
        if (k2) begin
          checks++;
          if (q2 !== e2) begin failures++; if (failures < 10) $display("FAIL L=2 cyc %0d got %b want %b", cyc, q2, e2); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBEAT + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
