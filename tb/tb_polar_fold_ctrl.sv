// tb_polar_fold_ctrl: tests the schedule control for N = 16, P = 4.
// Random codewords of four back-to-back beats, separated by random idle
// gaps, drive valid_i. The test keeps its own record of (valid, beat
// number) per cycle and expects: sel_o[0] = valid and beat bit 0 in the
// same cycle, sel_o[1] = valid and beat bit 1 one cycle earlier, and
// valid_o / first_o / last_o three cycles after the input beat
// (first_o on beat 0, last_o on beat 3). It also checks that the beat
// count restarts after a reset.
module tb_polar_fold_ctrl;
  localparam int unsigned NCYC = 3000;

  logic clk = 0, rst_n = 0, valid_i = 0;
  logic [1:0] sel_o;
  logic valid_o, first_o, last_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  polar_fold_ctrl dut (.clk, .rst_n, .valid_i, .sel_o, .valid_o, .first_o, .last_o);

  bit rv [NCYC];
  int rb [NCYC];

  task automatic chk(bit ok, string what, int c);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL cyc %0d: %s", c, what); end
  endtask

  initial begin
    int beat;
    beat = -1;
    for (int c = 0; c < NCYC; c++) begin rv[c] = 0; rb[c] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NCYC; c++) begin
      if (c == NCYC / 2) begin
        // reset between codewords, after the pipeline drained
        rst_n = 0; valid_i = 0; beat = -1;
        @(negedge clk);
        rst_n = 1;
        for (int d = 0; d < 4; d++) begin rv[c-1-d] = 0; end
      end
      if (beat < 0 && $urandom_range(0, 2) != 0) beat = 0;
      valid_i = (beat >= 0);
      rv[c] = valid_i;
      rb[c] = (beat >= 0) ? beat : 0;
      #1;
      chk(sel_o[0] == (rv[c] && rb[c][0]), "sel_o[0]", c);
      if (c >= 1) chk(sel_o[1] == (rv[c-1] && rb[c-1][1]), "sel_o[1]", c);
      if (c >= 3) begin
        chk(valid_o == rv[c-3], "valid_o", c);
        chk(first_o == (rv[c-3] && rb[c-3] == 0), "first_o", c);
        chk(last_o == (rv[c-3] && rb[c-3] == 3), "last_o", c);
      end
      if (beat >= 0) beat = (beat == 3) ? -1 : beat + 1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
