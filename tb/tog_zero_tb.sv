// tog_zero_tb -- each request toggles exactly one of t (a == 0) or f
// (a /= 0), one clock later; no output moves without a request.
module tog_zero_tb;
  localparam int W = 8;
  logic clk = 0, clr_n = 0, req = 0, t, f;
  logic [W-1:0] a = '0;
  logic exp_t, exp_f;
  int checks = 0, failures = 0, zeros = 0;
  always #5 clk = ~clk;

  tog_zero #(.W(W)) dut (.clk, .clr_n, .a, .req, .t, .f);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    exp_t = 0; exp_f = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      a = ($urandom_range(3) == 0) ? '0 : W'($urandom);
      if (i % 2 == 0) begin
        req = ~req;
        if (a == 0) begin exp_t = ~exp_t; zeros++; end
        else exp_f = ~exp_f;
      end
      @(negedge clk);
      checks++;
      if (t !== exp_t || f !== exp_f) begin
        failures++; $display("FAIL i=%0d a=%0d t=%b f=%b", i, a, t, f);
      end
    end
    checks++; if (zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
