// tb_turbo_encoder: the rate-1/3 turbo encoder against the reference encoder
// for block sizes 32, 64, 432 and 16 (two banks), with input gaps. Checks
// each output triple, the position order, that outputs start one cycle after
// the last input bit and come on N consecutive cycles.
module tb_turbo_encoder;
  import turbo_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [6:0] win_len;
  logic in_valid, in_bit, in_ready, out_valid, out_s, out_c1, out_c2;
  logic [8:0] out_pos;
  turbo_encoder dut (.*);

  // two banks, window up to 8
  logic [3:0] win_len2;
  logic in_valid2, in_bit2, in_ready2, out_valid2, out_s2, out_c12, out_c22;
  logic [3:0] out_pos2;
  turbo_encoder #(.P(2), .WMAX(8)) dut2 (
    .clk(clk), .rst_n(rst_n), .win_len(win_len2), .in_valid(in_valid2), .in_bit(in_bit2),
    .in_ready(in_ready2), .out_valid(out_valid2), .out_s(out_s2), .out_c1(out_c12),
    .out_c2(out_c22), .out_pos(out_pos2));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic run(int L);
    int n;
    bit u [], s [], c1 [], c2 [];
    n = 4 * L;
    u = new[n];
    foreach (u[i]) u[i] = bit'($urandom & 1);
    ref_encode(u, 4, L, s, c1, c2);
    check(in_ready, "ready for a block");
    for (int i = 0; i < n; i++) begin
      while ($urandom % 4 == 0) begin in_valid = 1'b0; @(negedge clk); end
      in_valid = 1'b1; in_bit = u[i]; win_len = 7'(L);
      @(negedge clk);
    end
    in_valid = 1'b0;
    for (int i = 0; i < n; i++) begin
      check(out_valid && !in_ready, "output on consecutive cycles");
      check(int'(out_pos) == i, "position order");
      check(out_s == s[i] && out_c1 == c1[i] && out_c2 == c2[i], $sformatf("triple %0d (N=%0d)", i, n));
      @(negedge clk);
    end
    check(!out_valid, "block ends after N outputs");
  endtask

  initial begin
    in_valid = 1'b0; in_bit = 1'b0; win_len = 7'd8;
    in_valid2 = 1'b0; in_bit2 = 1'b0; win_len2 = 4'd8;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(8);
    run(16);
    run(108);
    run(8);
    begin
      bit u [], s [], c1 [], c2 [];
      u = new[16];
      foreach (u[i]) u[i] = bit'($urandom & 1);
      ref_encode(u, 2, 8, s, c1, c2);
      for (int i = 0; i < 16; i++) begin
        in_valid2 = 1'b1; in_bit2 = u[i];
        @(negedge clk);
      end
      in_valid2 = 1'b0;
      for (int i = 0; i < 16; i++) begin
        check(out_valid2 && out_s2 == s[i] && out_c12 == c1[i] && out_c22 == c2[i],
              $sformatf("two-bank triple %0d", i));
        @(negedge clk);
      end
    end
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
