// tog_celem_tb -- random test of the C-element against its defining rule:
// the output follows the inputs when they agree and holds otherwise, with
// one clock of delay; master clear forces 0.
module tog_celem_tb;
  logic clk = 0, mc_n = 0, a = 0, b = 0, out;
  logic exp_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tog_celem dut (.clk, .mc_n, .a, .b, .out);

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++; if (out !== 1'b0) failures++;
    exp_out = 1'b0;
    @(negedge clk) mc_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      {a, b} = 2'($urandom);
      if (i == 250) mc_n = 0;
      if (i == 252) mc_n = 1;
      @(posedge clk);
      if (!mc_n)       exp_out = 1'b0;
      else if (a == b) exp_out = a;
      #1;
      checks++;
      if (out !== exp_out) begin
        failures++;
        $display("FAIL i=%0d a=%b b=%b out=%b exp=%b", i, a, b, out, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
