// tog_test_tb -- the three predicates (a < b unsigned, a <= 2, a > 0
// signed) on random and edge operands. Each request must toggle exactly one
// of t and f, the right one, one clock later.
module tog_test_tb;
  import shilpa_pkg::*;
  localparam int W = 16;
  logic clk = 0, clr_n = 0, req = 0;
  logic [W-1:0] a = '0, b = '0;
  logic [2:0] t, f;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tog_test #(.W(W), .OP(TEST_LT))  d0 (.clk, .clr_n, .a, .b, .req, .t(t[0]), .f(f[0]));
  tog_test #(.W(W), .OP(TEST_LE2)) d1 (.clk, .clr_n, .a, .b, .req, .t(t[1]), .f(f[1]));
  tog_test #(.W(W), .OP(TEST_GT0)) d2 (.clk, .clr_n, .a, .b, .req, .t(t[2]), .f(f[2]));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] t0, f0, holds;
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    for (int r = 0; r < 400; r++) begin
      @(negedge clk);
      case (r % 4)
        0: begin a = W'($urandom_range(4)); b = a; end
        1: begin a = W'($urandom); b = a + W'(1); end
        2: begin a = (r % 8 == 2) ? 16'h8000 : 16'h7fff; b = W'($urandom); end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      holds[0] = int'(a) < int'(b);
      holds[1] = int'(a) <= 2;
      holds[2] = a != 0 && a < 2**(W-1);
      t0 = t; f0 = f;
      req = ~req;
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        checks++;
        if ((t[k] != t0[k]) !== holds[k] || (f[k] != f0[k]) !== !holds[k]) begin
          failures++; $display("FAIL op=%0d a=%h b=%h", k, a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
