// tog_decr_tb -- every request yields y = a - 1 (modulo 2**W) with ack one
// clock later; wrap-around from 0 is included.
module tog_decr_tb;
  localparam int W = 8;
  logic clk = 0, clr_n = 0, req = 0, ack;
  logic [W-1:0] a = '0, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tog_decr #(.W(W)) dut (.clk, .clr_n, .a, .req, .y, .ack);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      a = (i == 0) ? '0 : W'($urandom);
      req = ~req;
      @(negedge clk);
      checks++;
      if (ack !== req || y !== W'((a + 2**W - 1) % 2**W)) begin
        failures++; $display("FAIL a=%0d y=%0d", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
