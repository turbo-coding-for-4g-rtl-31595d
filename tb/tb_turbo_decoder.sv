// tb_turbo_decoder: the parallel-window decoder against the reference model
// of the same schedule. Blocks of random soft values (not code words, so
// that every path of the arithmetic is exercised, saturation included) and
// noisy code words; block sizes 32 to 432, 1 to 5 iterations. Every decided
// bit must equal the reference; the latency must be n_iter*2*(2L+3)+1
// cycles; half_done must pulse twice per iteration; the permuted bank
// routing must be used and no collision may occur.
module tb_turbo_decoder;
  import turbo_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [6:0] win_len;
  logic [3:0] n_iter;
  logic in_valid, in_ready, out_valid, out_bit, half_done, xbar_perm, collision;
  logic signed [5:0] in_ys, in_y1p, in_y2p;
  logic [8:0] out_pos;
  turbo_decoder dut (.*);

  int checks = 0, failures = 0, n_half = 0, n_perm = 0, n_coll = 0;
  longint cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (half_done) n_half++;
      if (xbar_perm) n_perm++;
      if (collision) n_coll++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic run(int L, int iters, bit codeword);
    int n, h0;
    int ys [], y1p [], y2p [];
    bit u [], s [], c1 [], c2 [], dref [];
    longint t0;
    n = 4 * L;
    ys = new[n]; y1p = new[n]; y2p = new[n];
    u = new[n];
    foreach (u[i]) u[i] = bit'($urandom & 1);
    ref_encode(u, 4, L, s, c1, c2);
    for (int i = 0; i < n; i++) begin
      if (codeword) begin
        ys[i]  = sat((s[i]  ? 9 : -9) + int'($urandom % 17) - 8, 6);
        y1p[i] = sat((c1[i] ? 9 : -9) + int'($urandom % 17) - 8, 6);
        y2p[i] = sat((c2[i] ? 9 : -9) + int'($urandom % 17) - 8, 6);
      end else begin
        ys[i]  = int'($urandom % 64) - 32;
        y1p[i] = int'($urandom % 64) - 32;
        y2p[i] = int'($urandom % 64) - 32;
      end
    end
    ref_decode(4, L, iters, ys, y1p, y2p, dref);
    h0 = n_half;
    while (!in_ready) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      in_valid = 1'b1; win_len = 7'(L); n_iter = 4'(iters);
      in_ys = 6'(ys[i]); in_y1p = 6'(y1p[i]); in_y2p = 6'(y2p[i]);
      @(negedge clk);
    end
    in_valid = 1'b0;
    t0 = cyc;
    while (!out_valid && cyc - t0 < 50000) @(negedge clk);
    check(cyc - t0 == longint'(iters * 2 * (2 * L + 3) + 1), "decoder latency");
    for (int i = 0; i < n; i++) begin
      check(out_valid && int'(out_pos) == i, "output order");
      check(out_bit == dref[i], $sformatf("bit %0d of N=%0d, %0d iterations", i, n, iters));
      @(negedge clk);
    end
    check(n_half - h0 == 2 * iters, "half-iterations counted");
  endtask

  initial begin
    in_valid = 1'b0; win_len = 7'd8; n_iter = 4'd1; in_ys = '0; in_y1p = '0; in_y2p = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run(8, 1, 1'b0);
    run(8, 3, 1'b1);
    run(24, 2, 1'b0);
    run(108, 1, 1'b0);
    run(108, 5, 1'b1);
    check(n_perm > 0, "permuted routing used");
    check(n_coll == 0, "no collision");
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
