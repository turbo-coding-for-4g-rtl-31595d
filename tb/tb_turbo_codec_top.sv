// tb_turbo_codec_top: end-to-end test of the turbo codec core at its default
// size (4 windows, window length up to 108, blocks up to 432 bits).
//
// For each block: random information bits go through the encoder (its output
// is compared with a reference encoder), are mapped to BPSK soft values
// (+A for a one, -A for a zero) with optional noise, and go through the
// decoder. The decoded bits are compared bit-exactly with a reference model
// of the parallel-window max-log-MAP schedule, and, for noise-free blocks,
// with the information bits. Cycle counts of both paths are checked against
// their schedules. Mechanisms counted (each must occur): half-iterations,
// interleaved (permuted) bank routing, channel errors corrected by decoding,
// the smallest and the largest block size, several iterations, back-to-back
// blocks. A bank collision is a failure.
module tb_turbo_codec_top;
  import turbo_ref_pkg::*;

  localparam int P = 4;
  localparam int WMAX = 108;
  localparam int A = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // reset edge at start
  always #5 clk = ~clk;

  logic [6:0]  enc_win_len, dec_win_len;
  logic        enc_in_valid, enc_in_bit, enc_in_ready;
  logic        enc_out_valid, enc_out_s, enc_out_c1, enc_out_c2;
  logic [8:0]  enc_out_pos, dec_out_pos;
  logic [3:0]  dec_n_iter;
  logic        dec_in_valid, dec_in_ready, dec_out_valid, dec_out_bit;
  logic signed [5:0] dec_in_ys, dec_in_y1p, dec_in_y2p;
  logic        dec_half_done, dec_xbar_perm, dec_collision;

  turbo_codec_top dut (.*);

  int checks = 0, failures = 0;
  int n_half = 0, n_perm = 0, n_coll = 0, n_corrected = 0;
  int n_small = 0, n_large = 0, n_multi_iter = 0, n_blocks = 0;
  longint cyc = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (dec_half_done) n_half++;
      if (dec_xbar_perm) n_perm++;
      if (dec_collision) n_coll++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int noise(int amp);
    if (amp == 0) return 0;
    return int'($urandom % (2 * amp + 1)) - amp + int'($urandom % (2 * amp + 1)) - amp;
  endfunction

  task automatic run_block(int L, int iters, int amp);
    int n;
    bit u [], s [], c1 [], c2 [], dref [];
    int ys [], y1p [], y2p [];
    bit got [];
    longint t_last_in, t_first_out;
    int ch_err, dec_err, half0;
    n = P * L;
    u = new[n];
    foreach (u[i]) u[i] = bit'($urandom & 1);
    ref_encode(u, P, L, s, c1, c2);

    // ---- encoder ----
    @(negedge clk);
    while (!enc_in_ready) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      enc_win_len = 7'(L); enc_in_valid = 1'b1; enc_in_bit = u[i];
      @(negedge clk);
    end
    enc_in_valid = 1'b0;
    t_last_in = cyc;
    begin
      int got_n, gap;
      got_n = 0; gap = 0;
      while (got_n < n) begin
        if (enc_out_valid) begin
          if (got_n == 0) check(cyc - t_last_in == 0, "encoder output starts right after the last input");
          check(int'(enc_out_pos) == got_n, "encoder position order");
          check(enc_out_s == s[got_n] && enc_out_c1 == c1[got_n] && enc_out_c2 == c2[got_n],
                $sformatf("encoder triple at %0d", got_n));
          got_n++;
        end else if (got_n > 0) gap++;
        @(negedge clk);
        if (cyc - t_last_in > 4 * n + 10) break;
      end
      check(got_n == n && gap == 0, "encoder gives N triples on consecutive cycles");
    end

    // ---- channel ----
    ys = new[n]; y1p = new[n]; y2p = new[n];
    ch_err = 0;
    for (int i = 0; i < n; i++) begin
      ys[i]  = sat((s[i]  ? A : -A) + noise(amp), 6);
      y1p[i] = sat((c1[i] ? A : -A) + noise(amp), 6);
      y2p[i] = sat((c2[i] ? A : -A) + noise(amp), 6);
      if ((ys[i] > 0) != u[i]) ch_err++;
    end
    ref_decode(P, L, iters, ys, y1p, y2p, dref);

    // ---- decoder ----
    half0 = n_half;
    while (!dec_in_ready) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      dec_win_len = 7'(L); dec_n_iter = 4'(iters); dec_in_valid = 1'b1;
      dec_in_ys = 6'(ys[i]); dec_in_y1p = 6'(y1p[i]); dec_in_y2p = 6'(y2p[i]);
      @(negedge clk);
    end
    dec_in_valid = 1'b0;
    t_last_in = cyc;
    while (!dec_out_valid && cyc - t_last_in < 100000) @(negedge clk);
    t_first_out = cyc;
    check(t_first_out - t_last_in == longint'(iters * 2 * (2 * L + 3) + 1),
          $sformatf("decoder latency %0d, expected %0d", t_first_out - t_last_in, iters * 2 * (2 * L + 3) + 1));
    got = new[n];
    dec_err = 0;
    for (int i = 0; i < n; i++) begin
      check(dec_out_valid && int'(dec_out_pos) == i, "decoder output position order");
      got[i] = dec_out_bit;
      @(negedge clk);
    end
    for (int i = 0; i < n; i++) begin
      check(got[i] == dref[i], $sformatf("decoded bit %0d matches the reference decoder", i));
      if (got[i] != u[i]) dec_err++;
      if (got[i] == u[i] && ((ys[i] > 0) != u[i])) n_corrected++;
    end
    if (amp == 0) check(dec_err == 0, "noise-free block decodes without error");
    else check(dec_err <= ch_err, "decoding does not add errors");
    check(n_half - half0 == 2 * iters, "two half-iterations per iteration");
    $display("block N=%0d iters=%0d noise=%0d: channel errors %0d, decoded errors %0d",
             n, iters, amp, ch_err, dec_err);
    n_blocks++;
    if (L == 8) n_small++;
    if (L == WMAX) n_large++;
    if (iters > 1) n_multi_iter++;
  endtask

  initial begin
    enc_win_len = 7'd8; dec_win_len = 7'd8; dec_n_iter = 4'd1;
    enc_in_valid = 1'b0; enc_in_bit = 1'b0;
    dec_in_valid = 1'b0; dec_in_ys = '0; dec_in_y1p = '0; dec_in_y2p = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_block(8, 1, 0);        // N = 32, smallest block
    run_block(WMAX, 2, 0);     // N = 432, the main block size
    run_block(WMAX, 4, 7);     // N = 432 with noise
    run_block(16, 3, 7);       // N = 64 with noise
    run_block(8, 2, 5);        // N = 32 with noise
    check(n_perm > 0, "interleaved bank routing used");
    check(n_coll == 0, "no bank collision");
    check(n_corrected > 0, "channel errors corrected by decoding");
    check(n_small > 0 && n_large > 0, "smallest and largest block sizes run");
    check(n_multi_iter > 0 && n_blocks >= 2, "several iterations and back-to-back blocks");
    $display("mechanisms: half-iterations %0d, permuted-routing cycles %0d, corrected %0d, collisions %0d",
             n_half, n_perm, n_corrected, n_coll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
