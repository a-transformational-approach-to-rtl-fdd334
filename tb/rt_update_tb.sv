// rt_update_tb -- drives x <- f(x, y) with a behavioural FAB_f computing
// f(x, y) = 3x + y (mod 2**W) after a random delay. Checks the arguments
// presented to FAB_f, the new x at done, and the step latency: done comes 3
// clocks after go plus the FAB_f time.
module rt_update_tb;
  localparam int W = 8;
  logic clk = 0, clr_n = 0, go = 0, done, fab_init, fab_done = 0;
  logic [W-1:0] y = '0, x, fab_a, fab_b, fab_r = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rt_update #(.W(W)) dut (.clk, .clr_n, .go, .done, .y, .x,
                          .fab_init, .fab_done, .fab_a, .fab_b, .fab_r);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural function action block
  initial begin
    forever begin
      @(negedge clk);
      if (fab_init != fab_done) begin
        repeat ($urandom_range(4)) @(negedge clk);
        fab_r = W'(3 * fab_a + fab_b);
        fab_done = fab_init;
      end
    end
  end

  initial begin
    logic [W-1:0] model_x;
    int cycles;
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    model_x = '0;
    for (int r = 0; r < 100; r++) begin
      @(negedge clk);
      y = W'($urandom);
      go = ~go;
      cycles = 0;
      while (done != go) begin
        @(negedge clk); cycles++;
        if (fab_init != fab_done) begin
          checks++;
          if (fab_a !== model_x || fab_b !== y) begin failures++; $display("FAIL args r=%0d", r); end
        end
      end
      model_x = W'(3 * model_x + y);
      checks++;
      if (x !== model_x) begin failures++; $display("FAIL x=%0d exp=%0d", x, model_x); end
      checks++;
      if (cycles < 4 || cycles > 8) begin failures++; $display("FAIL latency %0d", cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
