// tb_rsc_encoder: checks the UMTS constituent encoder against the reference
// trellis (polynomials 1 + D^2 + D^3 and 1 + D + D^3) on random bit streams,
// including the return to state 0 on 'init' and holding the state while
// 'en' is low. A known impulse response is checked as well.
module tb_rsc_encoder;
  import turbo_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic init, en, u, parity;
  logic [2:0] state;
  rsc_encoder dut (.*);

  int checks = 0, failures = 0;
  int st;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // Impulse response of g1/g0 from state 0: 1 1 0 1 followed by a period-7
  // sequence (1 + D + D^3 divided by 1 + D^2 + D^3).
  bit imp [12];
  initial begin
    init = 1'b0; en = 1'b0; u = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // impulse response worked out by polynomial division
    begin
      int a [16];
      for (int i = 0; i < 16; i++) begin
        int ui;
        ui = (i == 0);
        a[i] = ui ^ ((i >= 2) ? a[i-2] : 0) ^ ((i >= 3) ? a[i-3] : 0);
        if (i < 12) imp[i] = bit'(a[i] ^ ((i >= 1) ? a[i-1] : 0) ^ ((i >= 3) ? a[i-3] : 0));
      end
    end
    init = 1'b1; @(negedge clk); init = 1'b0;
    for (int i = 0; i < 12; i++) begin
      en = 1'b1; u = (i == 0);
      #1 check(parity == imp[i], $sformatf("impulse response bit %0d", i));
      @(negedge clk);
    end
    // random streams with init and enable gaps
    for (int blk = 0; blk < 20; blk++) begin
      init = 1'b1; en = 1'b0; @(negedge clk); init = 1'b0;
      st = 0;
      check(state == 3'd0, "init returns to state 0");
      for (int i = 0; i < 60; i++) begin
        en = bit'($urandom % 4 != 0);
        u  = bit'($urandom & 1);
        #1 check(parity == bit'(ref_par(st, int'(u))), "parity bit");
        if (en) st = ref_next(st, int'(u));
        @(negedge clk);
        check(int'(state) == st, "state after step");
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
