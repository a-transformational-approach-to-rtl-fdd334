// tog_amux_tb -- alternates random requests on inputs A and B. For each one
// the output channel must carry that input's data with a creq toggle; after
// the receiver's cack, exactly the requesting side is acknowledged.
module tog_amux_tb;
  localparam int W = 8;
  logic clk = 0, clr_n = 0;
  logic areq = 0, aack, breq = 0, back, creq, cack = 0;
  logic [W-1:0] a = '0, b = '0, c;
  int checks = 0, failures = 0, na = 0, nb = 0;
  always #5 clk = ~clk;

  tog_amux #(.W(W)) dut (.clk, .clr_n, .areq, .a, .aack, .breq, .b, .back, .creq, .c, .cack);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic use_b, aack0, back0;
    logic [W-1:0] val;
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      use_b = 1'($urandom);
      val = W'($urandom);
      aack0 = aack; back0 = back;
      if (use_b) begin b = val; breq = ~breq; nb++; end
      else       begin a = val; areq = ~areq; na++; end
      while (creq == cack) @(negedge clk);
      checks++;
      if (c !== val) begin failures++; $display("FAIL data c=%h exp=%h", c, val); end
      repeat ($urandom_range(3)) @(negedge clk);
      cack = ~cack;
      repeat (3) @(negedge clk);
      checks++;
      if (use_b ? (back === back0 || aack !== aack0 || back !== breq)
                : (aack === aack0 || back !== back0 || aack !== areq)) begin
        failures++; $display("FAIL ack i=%0d use_b=%b", i, use_b);
      end
    end
    checks++; if (na == 0 || nb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
