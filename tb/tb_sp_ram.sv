// tb_sp_ram: single-port bank; random writes and reads against a model,
// checking the one-cycle read latency and that a write leaves 'q' alone.
module tb_sp_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic en, we;
  logic [6:0] addr;
  logic [8:0] d, q;
  sp_ram #(.DW(9), .DEPTH(108)) dut (.*);

  int checks = 0, failures = 0;
  logic [8:0] model [108];
  logic [8:0] last_q;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    en = 1'b1; we = 1'b1; d = '0;
    for (int i = 0; i < 108; i++) begin
      addr = 7'(i); d = 9'($urandom); model[i] = d;
      @(negedge clk);
    end
    en = 1'b1; we = 1'b0; addr = 7'd0; @(negedge clk);
    last_q = q;
    for (int i = 0; i < 3000; i++) begin
      int a;
      a = $urandom % 108;
      addr = 7'(a);
      en = bit'($urandom % 5 != 0);
      we = bit'($urandom & 1);
      d  = 9'($urandom);
      @(negedge clk);
      if (en && !we) check(q == model[a], "read data");
      else           check(q == last_q, "q holds without a read");
      if (en && we) model[a] = d;
      last_q = q;
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
