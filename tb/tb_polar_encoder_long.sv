// tb_polar_encoder_long: runs the folded polar encoder at longer code
// lengths and other degrees of parallelism than the default 16/4, through
// tb_polar_enc_run: (32, 2), (64, 4), (256, 8) and (1024, 16). N = 1024 is
// the longest code length of the 5G NR control channels. Each
// configuration is checked against the generator matrix, including the
// output order and the latency N/P - 1.
module tb_polar_encoder_long;
  logic clk = 0;
  always #5 clk = ~clk;

  int c [4], f [4];
  logic d [4];

  tb_polar_enc_run #(.N(32),   .P(2),  .NCW(60)) r0 (.clk, .checks_o(c[0]), .failures_o(f[0]), .done_o(d[0]));
  tb_polar_enc_run #(.N(64),   .P(4),  .NCW(60)) r1 (.clk, .checks_o(c[1]), .failures_o(f[1]), .done_o(d[1]));
  tb_polar_enc_run #(.N(256),  .P(8),  .NCW(40)) r2 (.clk, .checks_o(c[2]), .failures_o(f[2]), .done_o(d[2]));
  tb_polar_enc_run #(.N(1024), .P(16), .NCW(30)) r3 (.clk, .checks_o(c[3]), .failures_o(f[3]), .done_o(d[3]));

  initial begin
    repeat (2) @(posedge clk);
    wait (d[0] && d[1] && d[2] && d[3]);
    $display("TB_RESULT checks=%0d failures=%0d",
             c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3]);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d",
             c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end
endmodule
