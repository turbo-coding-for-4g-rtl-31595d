// tb_turbo_decoder_scaled: the decoder at other degrees of parallelism,
// 2 windows (window up to 8) and 8 windows (window up to 16), each checked
// bit-exactly against the reference schedule by a dec_harness.
module tb_turbo_decoder_scaled;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  int c2, f2, c8, f8;
  logic d2, d8;

  dec_harness #(.P(2), .WMAX(8))  h2 (.clk(clk), .rst_n(rst_n), .checks(c2), .failures(f2), .done(d2));
  dec_harness #(.P(8), .WMAX(16)) h8 (.clk(clk), .rst_n(rst_n), .checks(c8), .failures(f8), .done(d8));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (d2 && d8);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c8, f2 + f8);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c8, f2 + f8 + 1);
    $finish;
  end
endmodule
