// tb_siso_window: one max-log-MAP window against the reference model.
// Random windows (lengths 1 to 108, known or unknown start state, random
// channel and a-priori values, input gaps): every extrinsic value and hard
// decision must equal the reference, results must come for t = L-1 down to
// 0 on consecutive cycles starting one cycle after the last input, and
// 'busy' must fall right after the last result.
module tb_siso_window;
  import turbo_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, alpha_known, in_valid, out_valid, hard, busy;
  logic [6:0] win_len, out_t;
  logic signed [5:0] sys, par;
  logic signed [7:0] apr, ext;

  siso_window dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic run(int L, bit known, bit gaps, int amp);
    int sy [], py [], ap [], ex [];
    bit hd [];
    sy = new[L]; py = new[L]; ap = new[L];
    for (int t = 0; t < L; t++) begin
      sy[t] = int'($urandom % (2 * amp + 1)) - amp;
      py[t] = int'($urandom % (2 * amp + 1)) - amp;
      ap[t] = int'($urandom % 101) - 50;
    end
    ref_siso(L, known, sy, py, ap, ex, hd);
    start = 1'b1; win_len = 7'(L); alpha_known = known;
    @(negedge clk);
    start = 1'b0;
    for (int t = 0; t < L; t++) begin
      if (gaps) while ($urandom % 3 == 0) begin in_valid = 1'b0; @(negedge clk); end
      in_valid = 1'b1; sys = 6'(sy[t]); par = 6'(py[t]); apr = 8'(ap[t]);
      @(negedge clk);
    end
    in_valid = 1'b0;
    for (int t = L - 1; t >= 0; t--) begin
      check(out_valid, "result on every cycle of the backward pass");
      check(int'(out_t) == t, "results in descending order");
      check(int'(ext) == ex[t], $sformatf("extrinsic L=%0d t=%0d got %0d exp %0d", L, t, ext, ex[t]));
      check(hard == hd[t], "hard decision");
      @(negedge clk);
    end
    check(!out_valid && !busy, "window idle after its last result");
  endtask

  initial begin
    start = 1'b0; in_valid = 1'b0; alpha_known = 1'b0; win_len = '0;
    sys = '0; par = '0; apr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(8, 1'b1, 1'b0, 31);
    run(108, 1'b0, 1'b0, 31);
    run(1, 1'b0, 1'b0, 10);
    for (int i = 0; i < 30; i++) run(1 + $urandom % 108, bit'($urandom & 1), bit'($urandom & 1), 5 + $urandom % 27);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
