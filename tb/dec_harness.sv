// dec_harness: drives one turbo_decoder instance of a given size with blocks
// of random soft values and compares every decided bit with the reference
// schedule. Used to run decoders of other widths (window counts) than the
// default side by side. Reports its counts on 'checks'/'failures' and raises
// 'done' when finished.
module dec_harness #(
  parameter int unsigned P    = 2,
  parameter int unsigned WMAX = 8
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  import turbo_ref_pkg::*;

  logic [$clog2(WMAX+1)-1:0] win_len;
  logic [3:0] n_iter;
  logic in_valid, in_ready, out_valid, out_bit, half_done, xbar_perm, collision;
  logic signed [5:0] in_ys, in_y1p, in_y2p;
  logic [$clog2(P*WMAX)-1:0] out_pos;

  turbo_decoder #(.P(P), .WMAX(WMAX)) dut (.*);

  int n_perm = 0, n_coll = 0;
  always @(posedge clk) if (rst_n) begin
    if (xbar_perm) n_perm++;
    if (collision) n_coll++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL (P=%0d): %s", P, what); end
  endtask

  task automatic run(int L, int iters);
    int n;
    int ys [], y1p [], y2p [];
    bit dref [];
    n = P * L;
    ys = new[n]; y1p = new[n]; y2p = new[n];
    for (int i = 0; i < n; i++) begin
      ys[i]  = int'($urandom % 64) - 32;
      y1p[i] = int'($urandom % 64) - 32;
      y2p[i] = int'($urandom % 64) - 32;
    end
    ref_decode(P, L, iters, ys, y1p, y2p, dref);
    while (!in_ready) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      in_valid = 1'b1; win_len = ($clog2(WMAX+1))'(L); n_iter = 4'(iters);
      in_ys = 6'(ys[i]); in_y1p = 6'(y1p[i]); in_y2p = 6'(y2p[i]);
      @(negedge clk);
    end
    in_valid = 1'b0;
    while (!out_valid) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      check(out_valid && int'(out_pos) == i, "output order");
      check(out_bit == dref[i], $sformatf("bit %0d, N=%0d", i, n));
      @(negedge clk);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    in_valid = 1'b0; win_len = '0; n_iter = 4'd1; in_ys = '0; in_y1p = '0; in_y2p = '0;
    @(posedge rst_n);
    @(negedge clk);
    run(int'(P), 2);
    run(int'(WMAX), 3);
    run(int'(WMAX), 1);
    check(n_perm > 0, "permuted routing used");
    check(n_coll == 0, "no collision");
    done = 1'b1;
  end
endmodule
