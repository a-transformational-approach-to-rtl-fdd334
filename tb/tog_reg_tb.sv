// tog_reg_tb -- the register loads exactly on a request toggle, answers on
// ack one clock later with the data already in q, and ignores its input
// while no request is pending.
module tog_reg_tb;
  localparam int W = 8;
  logic clk = 0, clr_n = 0, req = 0, ack;
  logic [W-1:0] d = '0, q, exp_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tog_reg #(.W(W)) dut (.clk, .clr_n, .req, .ack, .d, .q);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    checks++; if (q !== '0 || ack !== 1'b0) failures++;
    exp_q = '0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d = W'($urandom);
      if ($urandom_range(1)) begin
        req = ~req;
        exp_q = d;
        @(negedge clk);
        checks++;
        if (ack !== req || q !== exp_q) begin
          failures++; $display("FAIL load i=%0d q=%h exp=%h", i, q, exp_q);
        end
        d = W'($urandom);           // data may change after the acknowledge
      end
      @(negedge clk);
      checks++;
      if (q !== exp_q || ack !== req) begin
        failures++; $display("FAIL hold i=%0d q=%h exp=%h", i, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
