// tb_cf_addr_gen: checks the collision-free interleaver address generator.
//   - the N = 16, W = 4 example: windows {0,4,8,12}, {13,1,5,9},
//     {10,14,2,6}, {7,11,15,3} in that order;
//   - at the default size (4 banks, window 108) and at 3 banks, window 12:
//     the permutation matches the matrix-construction reference, every
//     position is hit once (a permutation) and the P windows address P
//     different banks at every step (no collision).
module tb_cf_addr_gen;
  import turbo_ref_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // example size
  logic [1:0] t4;
  logic [1:0] b4 [4];
  logic [1:0] a4 [4];
  cf_addr_gen #(.P(4), .WMAX(4)) dut4 (.t(t4), .bank(b4), .addr(a4));

  // default size
  logic [6:0] t108;
  logic [1:0] b108 [4];
  logic [6:0] a108 [4];
  cf_addr_gen dut108 (.t(t108), .bank(b108), .addr(a108));

  // three banks
  logic [3:0] t12;
  logic [1:0] b12 [3];
  logic [3:0] a12 [3];
  cf_addr_gen #(.P(3), .WMAX(12)) dut12 (.t(t12), .bank(b12), .addr(a12));

  int fig [16] = '{0, 4, 8, 12, 13, 1, 5, 9, 10, 14, 2, 6, 7, 11, 15, 3};

  initial begin
    bit seen [];
    for (int t = 0; t < 4; t++) begin
      t4 = 2'(t);
      #1;
      for (int k = 0; k < 4; k++)
        check(int'(b4[k]) * 4 + int'(a4[k]) == fig[k * 4 + t],
              $sformatf("example window %0d step %0d", k, t));
    end
    seen = new[432];
    for (int t = 0; t < 108; t++) begin
      t108 = 7'(t);
      #1;
      for (int k = 0; k < 4; k++) begin
        int o;
        o = int'(b108[k]) * 108 + int'(a108[k]);
        check(o == ref_pi(k * 108 + t, 4, 108), "default size matches reference");
        check(!seen[o], "each position used once");
        seen[o] = 1'b1;
        for (int j = 0; j < k; j++) check(b108[j] != b108[k], "no bank collision");
      end
    end
    seen = new[36];
    for (int t = 0; t < 12; t++) begin
      t12 = 4'(t);
      #1;
      for (int k = 0; k < 3; k++) begin
        int o;
        o = int'(b12[k]) * 12 + int'(a12[k]);
        check(o == ref_pi(k * 12 + t, 3, 12), "three banks match reference");
        check(!seen[o], "each position used once (3 banks)");
        seen[o] = 1'b1;
        for (int j = 0; j < k; j++) check(b12[j] != b12[k], "no bank collision (3 banks)");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
