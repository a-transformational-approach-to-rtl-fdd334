// input_channel_tb -- one sender and N = 3 receivers on a multicast and on
// a broadcast channel side by side. Per round: random value, receivers and
// sender ready at random times. Checked: every receiver's register holds
// the value when its acknowledge toggles; the sender's done toggles only
// after all three have latched; with broadcast no receiver is acknowledged
// before done, with multicast a receiver that was ready early is.
module input_channel_tb;
  localparam int W = 8, N = 3;
  logic clk = 0, clr_n = 0, ctl = 0;
  logic [W-1:0] data = '0;
  logic [N-1:0] rdy = '0;
  logic         done_m, done_b;
  logic [N-1:0] ack_m, ack_b;
  logic [W-1:0] y_m [N], y_b [N];
  int checks = 0, failures = 0, early_m = 0;
  always #5 clk = ~clk;

  input_channel #(.W(W), .N(N), .BROADCAST(1'b0)) dut_m (
    .clk, .clr_n, .ctl, .data, .done(done_m), .rdy, .rx_ack(ack_m), .y(y_m));
  input_channel #(.W(W), .N(N), .BROADCAST(1'b1)) dut_b (
    .clk, .clr_n, .ctl, .data, .done(done_b), .rdy, .rx_ack(ack_b), .y(y_b));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_rdy [N];
    int t_ctl;
    logic ph;
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    for (int r = 0; r < 50; r++) begin
      ph = 1'(r + 1);
      t_ctl = $urandom_range(4);
      for (int i = 0; i < N; i++) t_rdy[i] = $urandom_range(4);
      for (int cyc = 0; cyc < 12; cyc++) begin
        if (cyc == t_ctl) begin data = W'($urandom); ctl = ~ctl; end
        for (int i = 0; i < N; i++) if (cyc == t_rdy[i]) rdy[i] = ~rdy[i];
        @(negedge clk);
        for (int i = 0; i < N; i++) begin
          if (ack_m[i] == ph) begin
            checks++;
            if (y_m[i] !== data) begin failures++; $display("FAIL m y r=%0d i=%0d", r, i); end
            if (done_m != ph) early_m++;
          end
          if (ack_b[i] == ph) begin
            checks++;
            if (y_b[i] !== data || done_b != ph) begin
              failures++; $display("FAIL b r=%0d i=%0d", r, i);
            end
          end
        end
        if (done_m == ph) begin
          checks++;
          if (ack_m != {N{ph}}) begin failures++; $display("FAIL done_m early r=%0d", r); end
        end
      end
      checks++;
      if (done_m != ph || done_b != ph || ack_b != {N{ph}} || ack_m != {N{ph}}) begin
        failures++; $display("FAIL round r=%0d incomplete", r);
      end
    end
    checks++;
    if (early_m == 0) begin failures++; $display("FAIL multicast never ahead of done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
