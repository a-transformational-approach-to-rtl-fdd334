// tog_fab_tb -- one instance per operation, all requested together with
// random operands. Each must answer one clock later with the value computed
// here: 2a, 4a, a/2 (arithmetic), a/4 (logical), -a and a + b, modulo 2**W.
module tog_fab_tb;
  import shilpa_pkg::*;
  localparam int W = 16;
  localparam int NOP = 6;
  logic clk = 0, clr_n = 0, req = 0;
  logic [W-1:0] a = '0, b = '0;
  logic [W-1:0] y [NOP];
  logic [NOP-1:0] ack;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tog_fab #(.W(W), .OP(FAB_MULT2))  d0 (.clk, .clr_n, .a, .b, .req, .y(y[0]), .ack(ack[0]));
  tog_fab #(.W(W), .OP(FAB_TIMES4)) d1 (.clk, .clr_n, .a, .b, .req, .y(y[1]), .ack(ack[1]));
  tog_fab #(.W(W), .OP(FAB_DIV2))   d2 (.clk, .clr_n, .a, .b, .req, .y(y[2]), .ack(ack[2]));
  tog_fab #(.W(W), .OP(FAB_DIV4))   d3 (.clk, .clr_n, .a, .b, .req, .y(y[3]), .ack(ack[3]));
  tog_fab #(.W(W), .OP(FAB_NEG))    d4 (.clk, .clr_n, .a, .b, .req, .y(y[4]), .ack(ack[4]));
  tog_fab #(.W(W), .OP(FAB_PLUS))   d5 (.clk, .clr_n, .a, .b, .req, .y(y[5]), .ack(ack[5]));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sa, exp [NOP];
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    for (int r = 0; r < 300; r++) begin
      @(negedge clk);
      a = W'($urandom); b = W'($urandom);
      sa = (a >= 2**(W-1)) ? int'(a) - 2**W : int'(a);
      exp[0] = (int'(a) * 2) % 2**W;
      exp[1] = (int'(a) * 4) % 2**W;
      exp[2] = ((sa - (sa < 0 ? 1 : 0)) / 2 + 2**W) % 2**W;   // floor(sa/2)
      exp[3] = int'(a) / 4;
      exp[4] = (2**W - int'(a)) % 2**W;
      exp[5] = (int'(a) + int'(b)) % 2**W;
      req = ~req;
      @(negedge clk);
      for (int k = 0; k < NOP; k++) begin
        checks++;
        if (ack[k] !== req || y[k] !== W'(exp[k])) begin
          failures++; $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", k, a, b, y[k], exp[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
