// tb_polar_enc_run: reusable checker that runs the folded polar encoder at
// code length N and parallelism P. Instantiated by tb_polar_encoder_long.
//
// It sends NCW random codewords (plus the unit vectors, which select single
// rows of the generator matrix) back to back or with random idle gaps, and
// compares every output beat with the codeword computed from the generator
// matrix: v[r] = XOR of u[i] over all i whose binary digits include those
// of r, x[j] = v[bitrev(j)]. At output beat k, line 2m+o is expected to hold
// v[(P/2)*k + bitrev(m, log2(P)-1) + (N/2)*o]. Latency must be N/P - 1
// cycles. done_o rises when all codewords have come out.
module tb_polar_enc_run #(
  parameter int unsigned N   = 64,
  parameter int unsigned P   = 4,
  parameter int unsigned NCW = 50
) (
  input  logic clk,
  output int   checks_o,
  output int   failures_o,
  output logic done_o
);
  localparam int unsigned B   = N / P;
  localparam int unsigned LAT = B - 1;
  localparam int unsigned LN  = $clog2(N);
  localparam int unsigned LP  = $clog2(P);

  logic rst_n = 0, in_valid = 0;
  logic [P-1:0] u_in = '0;
  logic out_valid, out_first, out_last;
  logic [P-1:0] x_out;
  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  logic done = 0;

  assign checks_o = checks;
  assign failures_o = failures;
  assign done_o = done;

  polar_encoder_pp #(.N(N), .P(P)) dut (
    .clk, .rst_n, .in_valid, .u_in, .out_valid, .out_first, .out_last, .x_out
  );

  always @(posedge clk) cycle <= cycle + 1;

  function automatic int unsigned brev(int unsigned v, int unsigned bits);
    int unsigned r = 0;
    for (int unsigned i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

  function automatic logic [N-1:0] rows_ref(logic [N-1:0] u);
    logic [N-1:0] v;
    for (int unsigned r = 0; r < N; r++) begin
      v[r] = 1'b0;
      for (int unsigned i = r; i < N; i++)
        if ((i & r) == r) v[r] ^= u[i];
    end
    return v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d P=%0d @%0d: %s", N, P, cycle, what);
    end
  endtask

  logic [N-1:0]    exp_q [$];
  longint unsigned tin_q [$];
  int unsigned     out_beat = 0, words_out = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (exp_q.size() == 0) begin
        check(0, "output beat with no codeword pending");
      end else begin
        for (int unsigned l = 0; l < P; l++) begin
          int unsigned r, x_idx;
          r = (P / 2) * out_beat + brev(l / 2, LP - 1) + (N / 2) * (l % 2);
          x_idx = brev(r, LN);
          check(x_out[l] == exp_q[0][r],
                $sformatf("beat %0d line %0d (x%0d): got %0b", out_beat, l, x_idx, x_out[l]));
        end
        check(out_first == (out_beat == 0), "out_first");
        check(out_last == (out_beat == B - 1), "out_last");
        check(cycle - tin_q[0] == longint'(LAT), $sformatf("latency %0d", cycle - tin_q[0]));
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
    exp_q.push_back(rows_ref(u));
    for (int unsigned t = 0; t < B; t++) begin
      in_valid <= 1'b1;
      u_in     <= u[t*P +: P];
      @(posedge clk);
      tin_q.push_back(cycle);
    end
  endtask

  task automatic idle(int n);
    in_valid <= 1'b0;
    repeat (n) @(posedge clk);
  endtask

  initial begin
    logic [N-1:0] u;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int unsigned i = 0; i < N; i += 1 + N / 32) send_word(N'(1) << i);
    for (int w = 0; w < NCW; w++) begin
      if ($urandom_range(0, 3) == 0) idle($urandom_range(1, 2 * B));
      for (int unsigned c = 0; c < N; c += 32) u[c +: 32] = $urandom;
      send_word(u);
    end
    idle(LAT + 4);
    check(exp_q.size() == 0, $sformatf("%0d codewords never came out", exp_q.size()));
    check(words_out > NCW, $sformatf("only %0d codewords out", words_out));
    done = 1;
  end
endmodule
