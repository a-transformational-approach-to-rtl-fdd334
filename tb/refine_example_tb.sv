// refine_example_tb -- process S[x] <= p?y -> S[f(x,y)] with a second
// receiver on channel p. The testbench is the sender on p, the second
// receiver, and FAB_f with f(x, y) = x + 2y (mod 2**W). For each value sent,
// both receivers must get it, the sender's done must follow both, and x must
// follow the model before S accepts the next value.
module refine_example_tb;
  localparam int W = 8, N = 2;
  logic clk = 0, clr_n = 0, start = 0, p_ctl = 0, p_done, fab_init, fab_done = 0;
  logic [W-1:0] p_data = '0, x, fab_a, fab_b, fab_r = '0;
  logic [N-2:0] rx_rdy = '0, rx_ack;
  logic [W-1:0] rx_y [N-1];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  refine_example #(.W(W), .N(N), .BROADCAST(1'b0)) dut (
    .clk, .clr_n, .start, .p_ctl, .p_data, .p_done, .rx_rdy, .rx_ack, .rx_y,
    .x, .fab_init, .fab_done, .fab_a, .fab_b, .fab_r);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial forever begin
    @(negedge clk);
    if (fab_init != fab_done) begin
      repeat ($urandom_range(3)) @(negedge clk);
      fab_r = W'(fab_a + 2 * fab_b);
      fab_done = fab_init;
    end
  end

  initial begin
    logic [W-1:0] model_x;
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    @(negedge clk) start = 1;
    model_x = '0;
    for (int r = 0; r < 60; r++) begin
      repeat ($urandom_range(3)) @(negedge clk);
      p_data = W'($urandom);
      p_ctl = ~p_ctl;
      repeat ($urandom_range(3)) @(negedge clk);
      rx_rdy[0] = ~rx_rdy[0];
      while (p_done != p_ctl) @(negedge clk);
      checks++;
      if (rx_ack[0] != rx_rdy[0] || rx_y[0] !== p_data) begin
        failures++; $display("FAIL second receiver r=%0d", r);
      end
      model_x = W'(model_x + 2 * p_data);
      // S must finish its update before the next value can reach it
      while (dut.upd_done != dut.ack[0]) @(negedge clk);
      checks++;
      if (x !== model_x) begin failures++; $display("FAIL r=%0d x=%0d exp=%0d", r, x, model_x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
