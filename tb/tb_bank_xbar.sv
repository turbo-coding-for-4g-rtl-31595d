// tb_bank_xbar: window/bank interconnect. Random permutations of the bank
// selections: read routing, write routing and strobes, the identity flag.
// Then selections with two windows on one bank (with the assertion disabled)
// must raise 'collision'.
module tb_bank_xbar;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       check_en;
  logic [1:0] sel [4];
  logic [7:0] bank_q [4], win_q [4], win_d [4], bank_d [4];
  logic       win_we [4], bank_we [4];
  logic       identity, collision;

  bank_xbar #(.P(4), .DW(8)) dut (.clk(clk), .check(check_en), .*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int perm [4];
    check_en = 1'b1;
    for (int it = 0; it < 500; it++) begin
      int ident;
      perm = '{0, 1, 2, 3};
      if (it % 5 != 0)
        for (int i = 3; i > 0; i--) begin
          int j, tmp;
          j = $urandom % (i + 1);
          tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
        end
      ident = 1;
      for (int k = 0; k < 4; k++) begin
        sel[k]    = 2'(perm[k]);
        bank_q[k] = 8'($urandom);
        win_d[k]  = 8'($urandom);
        win_we[k] = bit'($urandom & 1);
        if (perm[k] != k) ident = 0;
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        check(win_q[k] == bank_q[perm[k]], "read routing");
        check(bank_d[perm[k]] == win_d[k], "write data routing");
        check(bank_we[perm[k]] == win_we[k], "write strobe routing");
      end
      check(identity == bit'(ident), "identity flag");
      check(!collision, "no collision on a permutation");
      @(negedge clk);
    end
    check_en = 1'b0;
    for (int it = 0; it < 100; it++) begin
      int a, b;
      a = $urandom % 4;
      b = (a + 1 + $urandom % 3) % 4;
      for (int k = 0; k < 4; k++) sel[k] = 2'(k);
      sel[a] = sel[b];
      #1 check(collision, "collision detected");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
