// bcell_tb -- N = 3 receivers. In each round the sender (ctl) and every
// receiver (in[i]) toggle once, in random order and at random times. out[i]
// must toggle exactly one clock after the later of in[i] and ctl, and never
// before both have toggled.
module bcell_tb;
  localparam int N = 3;
  logic clk = 0, clr_n = 0, ctl = 0;
  logic [N-1:0] in = '0, out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bcell #(.N(N)) dut (.clk, .clr_n, .ctl, .in, .out);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_in [N];
    int t_ctl, cyc;
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    for (int r = 0; r < 100; r++) begin
      t_ctl = $urandom_range(5);
      for (int i = 0; i < N; i++) t_in[i] = $urandom_range(5);
      for (cyc = 0; cyc <= 7; cyc++) begin
        if (cyc == t_ctl) ctl = ~ctl;
        for (int i = 0; i < N; i++) if (cyc == t_in[i]) in[i] = ~in[i];
        @(negedge clk);
        for (int i = 0; i < N; i++) begin
          logic want;
          want = (cyc >= t_in[i] && cyc >= t_ctl) ? 1'(r + 1) : 1'(r);
          checks++;
          if (out[i] !== want) begin
            failures++; $display("FAIL r=%0d cyc=%0d i=%0d out=%b", r, cyc, i, out[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
