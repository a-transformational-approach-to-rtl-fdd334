// sqrt_getw_tb -- gives random a (0 .. 4095) on get_number and plays pv and
// after_getw. For each a: initv must carry w/2 and go must carry w and -a,
// where w is the smallest 2*4^k above 2a; initv must come before go; the
// next a is accepted only after go is acknowledged. Also checks the number
// of clocks spent: 8 + 5 per multiplication by 4 (one clock per element on
// the path C, reg_a, mult2, AMUX, reg w, AMUX ack, LT, div2; LT loop of five).
module sqrt_getw_tb;
  localparam int W = 16;
  logic clk = 0, clr_n = 0, get_req = 0, get_ack, initv_out, initv_in = 0, go_out, go_in = 0;
  logic [W-1:0] get_data = '0, go_w;
  logic signed [W-1:0] initv_data, go_u;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sqrt_getw #(.W(W)) dut (.clk, .clr_n, .get_req, .get_data, .get_ack,
    .initv_out, .initv_data, .initv_in, .go_out, .go_w, .go_u, .go_in);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, w, k, cyc;
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    for (int r = 0; r < 200; r++) begin
      a = (r == 0) ? 0 : (r == 1) ? 4095 : $urandom_range(4095);
      w = 2; k = 0;
      while (2 * a >= w) begin w = 4 * w; k++; end
      get_data = W'(a);
      get_req = ~get_req;
      cyc = 0;
      while (initv_out == initv_in) begin
        @(negedge clk); cyc++;
        checks++;
        if (go_out != go_in) begin failures++; $display("FAIL go before initv"); end
      end
      checks++;
      if (initv_data !== W'(w / 2)) begin failures++; $display("FAIL a=%0d initv=%0d exp=%0d", a, initv_data, w / 2); end
      checks++;
      if (cyc != 8 + 5 * k) begin failures++; $display("FAIL a=%0d cycles=%0d exp=%0d", a, cyc, 8 + 5 * k); end
      repeat ($urandom_range(2)) @(negedge clk);
      initv_in = initv_out;
      while (go_out == go_in) @(negedge clk);
      checks++;
      if (go_w !== W'(w) || go_u !== W'(-a)) begin
        failures++; $display("FAIL a=%0d go_w=%0d go_u=%0d", a, go_w, go_u);
      end
      repeat (3) @(negedge clk);
      checks++;
      if (get_ack !== get_req) begin failures++; $display("FAIL get not acknowledged"); end
      go_in = go_out;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
