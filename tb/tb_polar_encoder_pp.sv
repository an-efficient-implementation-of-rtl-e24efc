// tb_polar_encoder_pp: end-to-end test of the folded polar encoder at its
// default size (N = 16, P = 4), with no parameter override.
//
// The reference codeword is computed straight from the generator matrix:
// v[r] = XOR of u[i] over every i whose binary digits include those of r
// (the entries of the Kronecker power of F), and x[j] = v[bitrev(j)].
// The expected position of every codeword bit is taken from a fixed table
// (output beat k, line l -> codeword index), not from the encoder's
// structure. The test sends codewords back to back and with idle gaps,
// resets in the middle of a codeword once, and checks data, the flags, the
// latency of N/P-1 = 3 cycles and that each folded stage's multiplexers
// took both positions (counted from the beats sent: the stage with delay
// 2^f switches on beats whose number has bit f set). It counts each of
// these events and fails if one of them never happened.
module tb_polar_encoder_pp;

  localparam int unsigned N = 16;
  localparam int unsigned P = 4;
  localparam int unsigned B = N / P;
  localparam int unsigned LAT = B - 1;
  localparam int unsigned NCW = 400;

  // codeword index on output beat k, line l, for the 16-bit 4-parallel order
  localparam int unsigned XPOS [B][P] = '{
    '{0, 1, 8, 9}, '{4, 5, 12, 13}, '{2, 3, 10, 11}, '{6, 7, 14, 15}
  };

  logic clk = 0;
  logic rst_n = 0;
  logic in_valid = 0;
  logic [P-1:0] u_in = '0;
  logic out_valid, out_first, out_last;
  logic [P-1:0] x_out;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;

  polar_encoder_pp dut (
    .clk, .rst_n, .in_valid, .u_in, .out_valid, .out_first, .out_last, .x_out
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int unsigned brev(int unsigned v, int unsigned bits);
    int unsigned r = 0;
    for (int unsigned i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  function automatic logic [N-1:0] encode_ref(logic [N-1:0] u);
    logic [N-1:0] v, x;
    for (int unsigned r = 0; r < N; r++) begin
      v[r] = 1'b0;
      for (int unsigned i = 0; i < N; i++)
        if ((i & r) == r) v[r] ^= u[i];
    end
    for (int unsigned j = 0; j < N; j++) x[j] = v[brev(j, $clog2(N))];
    return x;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // expected codewords and the cycle of each input beat
  logic [N-1:0]       exp_q [$];
  longint unsigned    tin_q [$];
  int unsigned        out_beat = 0;
  int unsigned        words_out = 0;

  // event counters
  int n_back_to_back = 0, n_gap = 0, n_reset_mid = 0, n_lat = 0;
  int n_sel1 [2] = '{0, 0};
  int n_sel0 [2] = '{0, 0};

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (exp_q.size() == 0) begin
        check(0, "output beat with no codeword pending");
      end else begin
        logic [N-1:0] x;
        x = exp_q[0];
        for (int l = 0; l < P; l++)
          check(x_out[l] == x[XPOS[out_beat][l]],
                $sformatf("beat %0d line %0d: got %0b want x%0d=%0b",
                          out_beat, l, x_out[l], XPOS[out_beat][l], x[XPOS[out_beat][l]]));
        check(out_first == (out_beat == 0), "out_first");
        check(out_last == (out_beat == B - 1), "out_last");
        check(cycle - tin_q[0] == longint'(LAT),
              $sformatf("latency %0d, want %0d", cycle - tin_q[0], LAT));
        n_lat++;
        void'(tin_q.pop_front());
        if (out_beat == B - 1) begin
          out_beat = 0;
          void'(exp_q.pop_front());
          words_out++;
        end else begin
          out_beat++;
        end
      end
    end
  end

  task automatic send_word(logic [N-1:0] u);
    exp_q.push_back(encode_ref(u));
    for (int t = 0; t < B; t++) begin
      in_valid <= 1'b1;
      u_in     <= u[t*P +: P];
      // folded stage f switches its multiplexers for beats with bit f set
      for (int f = 0; f < 2; f++) begin
        if (((t >> f) & 1) != 0) n_sel1[f]++; else n_sel0[f]++;
      end
      @(posedge clk);
      tin_q.push_back(cycle);
    end
  endtask

  // idle cycles: no beat
  task automatic idle(int n);
    in_valid <= 1'b0;
    repeat (n) @(posedge clk);
  endtask

  // a few fixed vectors: single ones pick out rows of G
  initial begin
    logic [N-1:0] u;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < N; i++) send_word(N'(1) << i);
    send_word('1);
    for (int w = 0; w < NCW; w++) begin
      int gap;
      gap = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 5) : 0;
      if (gap == 0) n_back_to_back++; else n_gap++;
      if (gap > 0) idle(gap);
      u = N'({$urandom, $urandom});
      if (w == NCW / 2) begin
        // reset in the middle of a codeword: nothing of it may come out
        idle(LAT + 2);   // drain what was complete
        for (int t = 0; t < 2; t++) begin
          in_valid <= 1'b1;
          u_in <= u[t*P +: P];
          @(posedge clk);
        end
        in_valid <= 1'b0;
        rst_n <= 1'b0;
        @(posedge clk);
        rst_n <= 1'b1;
        n_reset_mid++;
        @(posedge clk);
      end
      send_word(u);
    end
    idle(LAT + 4);
    check(exp_q.size() == 0, $sformatf("%0d codewords never came out", exp_q.size()));
    check(words_out == N + 1 + NCW, $sformatf("words out %0d", words_out));
    check(n_back_to_back > 0, "no back-to-back codewords");
    check(n_gap > 0, "no idle gap between codewords");
    check(n_reset_mid > 0, "no reset inside a codeword");
    check(n_lat > 0, "latency never measured");
    for (int f = 0; f < 2; f++) begin
      check(n_sel0[f] > 0 && n_sel1[f] > 0,
            $sformatf("stage %0d multiplexer stuck: sel0=%0d sel1=%0d", f + 3, n_sel0[f], n_sel1[f]));
    end
    $display("events: back_to_back=%0d gap=%0d reset_mid=%0d latency_checks=%0d sel1_stage3=%0d sel1_stage4=%0d",
             n_back_to_back, n_gap, n_reset_mid, n_lat, n_sel1[0], n_sel1[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
