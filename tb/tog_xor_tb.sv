// tog_xor_tb -- exhaustive test of the transition merge: for every input
// pattern the output is the parity of the inputs, so any single input toggle
// toggles the output.
module tog_xor_tb;
  localparam int N = 3;
  logic [N-1:0] in;
  logic out, prev;
  int checks = 0, failures = 0;

  tog_xor #(.N(N)) dut (.in, .out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      int par;
      par = 0;
      in = N'(v);
      for (int k = 0; k < N; k++) par ^= (v >> k) & 1;
      #1 checks++;
      if (out !== par[0]) begin failures++; $display("FAIL in=%b out=%b", in, out); end
    end
    // a single toggle on any input toggles the output
    in = '0;
    for (int i = 0; i < 30; i++) begin
      #1 prev = out;
      in[$urandom_range(N-1)] ^= 1'b1;
      #1 checks++;
      if (out === prev) begin failures++; $display("FAIL no toggle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
