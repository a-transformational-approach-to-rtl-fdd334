// ctree_tb -- N = 5 inputs toggle once per round in random order. The
// output must toggle exactly ceil(log2 5) = 3 clocks after the last input
// toggle and not before.
module ctree_tb;
  localparam int N = 5;
  localparam int LAT = 3;
  logic clk = 0, clr_n = 0, out;
  logic [N-1:0] in = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ctree #(.N(N)) dut (.clk, .clr_n, .in, .out);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_in [N];
    int last;
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    for (int r = 0; r < 60; r++) begin
      last = 0;
      for (int i = 0; i < N; i++) begin
        t_in[i] = $urandom_range(6);
        if (t_in[i] > last) last = t_in[i];
      end
      for (int cyc = 0; cyc <= last + LAT + 1; cyc++) begin
        for (int i = 0; i < N; i++) if (cyc == t_in[i]) in[i] = ~in[i];
        @(negedge clk);
        checks++;
        if (out !== ((cyc >= last + LAT - 1) ? 1'(r + 1) : 1'(r))) begin
          failures++; $display("FAIL r=%0d cyc=%0d last=%0d out=%b", r, cyc, last, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
