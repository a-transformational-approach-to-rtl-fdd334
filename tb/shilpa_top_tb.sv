// shilpa_top_tb -- end-to-end test of all three circuits of the top at
// their default sizes, running concurrently:
//   * factorial: start, then n = 0..12 and random n, each checked against
//     n! mod 2**32;
//   * square root: every a in 0..4095 against floor(sqrt(a));
//   * refined process S: 40 values on channel p with f(x, y) = x ^ y played
//     by the testbench, the second receiver checked too.
// Mechanisms counted, each required at least once: factpipe's n /= 0 branch
// (mult!n) and n = 0 branch (senda!), pa multiplying while factpipe
// decrements, getw's times-4 step, both outcomes of the t > 0 test
// (addw sent or not), and the multicast receiver of S acknowledged before
// the sender's done.
module shilpa_top_tb;
  localparam int FW = 8, AW = 32, SW = 16, EW = 8, EN = 2;
  logic clk = 0, clr_n = 0;
  logic fact_start = 0, fact_again_req = 0, fact_again_ack, fact_result_req, fact_result_ack = 0;
  logic fact_mul_busy;
  logic [FW-1:0] fact_again_data = '0;
  logic [AW-1:0] fact_result_data;
  logic sqrt_get_req = 0, sqrt_get_ack, sqrt_final_req, sqrt_final_ack = 0;
  logic [SW-1:0] sqrt_get_data = '0;
  logic signed [SW-1:0] sqrt_final_data;
  logic ex_start = 0, ex_p_ctl = 0, ex_p_done, ex_fab_init, ex_fab_done = 0;
  logic [EN-2:0] ex_rx_rdy = '0, ex_rx_ack;
  logic [EW-1:0] ex_p_data = '0, ex_rx_y [EN-1], ex_x, ex_fab_a, ex_fab_b, ex_fab_r = '0;
  int checks = 0, failures = 0;
  int n_mult = 0, n_senda = 0, n_overlap = 0, n_times4 = 0, n_decide = 0, n_add = 0, n_mcast = 0;
  bit fact_done = 0, sqrt_done = 0, ex_done = 0;
  always #5 clk = ~clk;

  shilpa_top dut (.*);

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  logic p_mult = 0, p_senda = 0, p_vpa = 0, p_addw = 0;
  logic p_t4 = 0;
  always @(negedge clk) begin
    if (dut.u_fact.mult_req != p_mult) n_mult++;
    if (dut.u_fact.senda_req != p_senda) n_senda++;
    if (fact_mul_busy && dut.u_fact.mult_req == dut.u_fact.mult_ack) n_overlap++;
    if (dut.u_sqrt.u_getw.t4_ack != p_t4) n_times4++;
    if (dut.u_sqrt.vportack_ack != p_vpa) n_decide++;
    if (dut.u_sqrt.addw_req != p_addw) n_add++;
    if (ex_p_done != ex_p_ctl && dut.u_ex.ack[0] == ex_p_ctl) n_mcast++;
    p_mult  <= dut.u_fact.mult_req;
    p_senda <= dut.u_fact.senda_req;
    p_t4    <= dut.u_sqrt.u_getw.t4_ack;
    p_vpa   <= dut.u_sqrt.vportack_ack;
    p_addw  <= dut.u_sqrt.addw_req;
  end

  function automatic logic [AW-1:0] fact(input int n);
    logic [AW-1:0] f = 1;
    for (int i = 2; i <= n; i++) f = f * AW'(i);
    return f;
  endfunction

  function automatic int isqrt(input int a);
    int z = 0;
    while ((z + 1) * (z + 1) <= a) z++;
    return z;
  endfunction

  task automatic fact_take(input int n);
    while (fact_result_req == fact_result_ack) @(negedge clk);
    checks++;
    if (fact_result_data !== fact(n)) begin
      failures++; $display("FAIL fact n=%0d got %0d", n, fact_result_data);
    end
    fact_result_ack = ~fact_result_ack;
  endtask

  // factorial
  initial begin
    int n;
    repeat (2) @(posedge clk);
    @(negedge clk) fact_start = 1;
    fact_take(0);
    for (int r = 0; r < 30; r++) begin
      n = (r <= 12) ? r : $urandom_range(60);
      @(negedge clk);
      fact_again_data = FW'(n);
      fact_again_req = ~fact_again_req;
      fact_take(n);
    end
    fact_done = 1;
  end

  // square root: producer and consumer
  int sent [$];
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    for (int a = 0; a < 4096; a++) begin
      while (sqrt_get_ack != sqrt_get_req) @(negedge clk);
      sqrt_get_data = SW'(a);
      sent.push_back(a);
      sqrt_get_req = ~sqrt_get_req;
      @(negedge clk);
    end
  end
  initial begin
    int a;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 4096; k++) begin
      while (sqrt_final_req == sqrt_final_ack) @(negedge clk);
      a = sent.pop_front();
      checks++;
      if (sqrt_final_data !== SW'(isqrt(a))) begin
        failures++; $display("FAIL sqrt a=%0d got %0d", a, sqrt_final_data);
      end
      sqrt_final_ack = ~sqrt_final_ack;
      @(negedge clk);
    end
    sqrt_done = 1;
  end

  // refined process S with FAB_f = xor
  initial forever begin
    @(negedge clk);
    if (ex_fab_init != ex_fab_done) begin
      ex_fab_r = ex_fab_a ^ ex_fab_b;
      ex_fab_done = ex_fab_init;
    end
  end
  initial begin
    logic [EW-1:0] mx = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) ex_start = 1;
    for (int r = 0; r < 40; r++) begin
      ex_p_data = EW'($urandom);
      ex_p_ctl = ~ex_p_ctl;
      repeat (2 + $urandom_range(3)) @(negedge clk);
      ex_rx_rdy[0] = ~ex_rx_rdy[0];
      while (ex_p_done != ex_p_ctl) @(negedge clk);
      checks++;
      if (ex_rx_y[0] !== ex_p_data || ex_rx_ack[0] != ex_rx_rdy[0]) begin
        failures++; $display("FAIL example receiver 1");
      end
      mx = mx ^ ex_p_data;
      while (dut.u_ex.upd_done != dut.u_ex.ack[0]) @(negedge clk);
      checks++;
      if (ex_x !== mx) begin failures++; $display("FAIL example x=%0d exp=%0d", ex_x, mx); end
    end
    ex_done = 1;
  end

  initial begin
    @(negedge clk) clr_n = 0;
    @(negedge clk) clr_n = 1;
    wait (fact_done && sqrt_done && ex_done);
    checks++; if (n_mult == 0)    begin failures++; $display("FAIL never mult"); end
    checks++; if (n_senda == 0)   begin failures++; $display("FAIL never senda"); end
    checks++; if (n_overlap == 0) begin failures++; $display("FAIL never overlapped"); end
    checks++; if (n_times4 == 0)  begin failures++; $display("FAIL never times4"); end
    checks++; if (n_add == 0 || n_decide - n_add == 0) begin failures++; $display("FAIL t branch"); end
    checks++; if (n_mcast == 0)   begin failures++; $display("FAIL never multicast early"); end
    $display("mult=%0d senda=%0d overlap=%0d times4=%0d addw=%0d keep=%0d mcast=%0d",
             n_mult, n_senda, n_overlap, n_times4, n_add, n_decide - n_add, n_mcast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
