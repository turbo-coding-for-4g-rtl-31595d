// tb_ber_432: bit-error-rate run of the codec at its main block size
// (N = 432, rate 1/3, BPSK over an additive white Gaussian noise channel).
//
// For each Eb/N0 point a number of blocks is encoded by the encoder, sent
// through the channel (noise from the Box-Muller method, sigma^2 =
// 1 / (2 * R * Eb/N0) with R = 1/3 for unit-energy symbols), quantised to
// 6-bit soft values (8 steps per unit amplitude, saturated) and decoded with
// 8 iterations. The decoded bits are compared bit-exactly with the reference
// decoder, the bit error rates before and after decoding are printed, and
// decoding must reduce the error count at every point.
module tb_ber_432;
  import turbo_ref_pkg::*;

  localparam int L = 108;
  localparam int N = 4 * L;
  localparam int ITERS = 8;
  localparam int BLOCKS = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic int quant(real y);
    return sat(int'(y * 8.0), 6);
  endfunction

  task automatic run_point(real ebn0_db, output int ch_err, output int dec_err);
    real sigma;
    sigma = $sqrt(1.0 / (2.0 * (1.0 / 3.0) * (10.0 ** (ebn0_db / 10.0))));
    ch_err = 0; dec_err = 0;
    for (int b = 0; b < BLOCKS; b++) begin
      bit u [], s [], c1 [], c2 [], dref [];
      int ys [], y1p [], y2p [];
      u = new[N]; s = new[N]; c1 = new[N]; c2 = new[N];
      ys = new[N]; y1p = new[N]; y2p = new[N];
      foreach (u[i]) u[i] = bit'($urandom & 1);
      // encode with the RTL encoder
      while (!enc_in_ready) @(negedge clk);
      for (int i = 0; i < N; i++) begin
        enc_win_len = 7'(L); enc_in_valid = 1'b1; enc_in_bit = u[i];
        @(negedge clk);
      end
      enc_in_valid = 1'b0;
      for (int i = 0; i < N; i++) begin
        while (!enc_out_valid) @(negedge clk);
        s[i] = enc_out_s; c1[i] = enc_out_c1; c2[i] = enc_out_c2;
        @(negedge clk);
      end
      for (int i = 0; i < N; i++) begin
        ys[i]  = quant((s[i]  ? 1.0 : -1.0) + sigma * gauss());
        y1p[i] = quant((c1[i] ? 1.0 : -1.0) + sigma * gauss());
        y2p[i] = quant((c2[i] ? 1.0 : -1.0) + sigma * gauss());
        if ((ys[i] > 0) != u[i]) ch_err++;
      end
      ref_decode(4, L, ITERS, ys, y1p, y2p, dref);
      while (!dec_in_ready) @(negedge clk);
      for (int i = 0; i < N; i++) begin
        dec_win_len = 7'(L); dec_n_iter = 4'(ITERS); dec_in_valid = 1'b1;
        dec_in_ys = 6'(ys[i]); dec_in_y1p = 6'(y1p[i]); dec_in_y2p = 6'(y2p[i]);
        @(negedge clk);
      end
      dec_in_valid = 1'b0;
      while (!dec_out_valid) @(negedge clk);
      for (int i = 0; i < N; i++) begin
        check(dec_out_bit == dref[i], "decoded bit equals reference");
        if (dec_out_bit != u[i]) dec_err++;
        @(negedge clk);
      end
    end
  endtask

  initial begin
    real pts [4] = '{0.5, 1.0, 1.5, 2.0};
    int ce, de;
    enc_win_len = 7'(L); dec_win_len = 7'(L); dec_n_iter = 4'(ITERS);
    enc_in_valid = 1'b0; enc_in_bit = 1'b0;
    dec_in_valid = 1'b0; dec_in_ys = '0; dec_in_y1p = '0; dec_in_y2p = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (pts[p]) begin
      run_point(pts[p], ce, de);
      $display("Eb/N0 %.1f dB: %0d bits, channel BER %.4f, decoded BER %.5f",
               pts[p], BLOCKS * N, real'(ce) / real'(BLOCKS * N), real'(de) / real'(BLOCKS * N));
      check(de < ce, "decoding reduces the number of errors");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
