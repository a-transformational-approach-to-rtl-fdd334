// psqrt_tb -- end-to-end integer square root: for every a in 0..4095 the
// circuit must return floor(sqrt(a)) on final_answer. Inputs are offered as
// soon as get_number is free, so pv's final_answer for one number overlaps
// the next number's getw loop. Counted and required at least once: the
// times-4 step of getw, both outcomes of the t > 0 test, and a get_number
// accepted while an earlier answer is still pending.
module psqrt_tb;
  localparam int W = 16;
  localparam int NA = 4096;
  logic clk = 0, clr_n = 0, get_req = 0, get_ack, final_req, final_ack = 0;
  logic [W-1:0] get_data = '0;
  logic signed [W-1:0] final_data;
  int checks = 0, failures = 0;
  int n_times4 = 0, n_add = 0, n_keep = 0, n_overlap = 0;
  always #5 clk = ~clk;

  psqrt #(.W(W)) dut (.clk, .clr_n, .get_req, .get_data, .get_ack,
                      .final_req, .final_data, .final_ack);

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watch the internal channels: times-4 completions in getw, loop decisions, addw
  logic prev_t4 = 0;
  logic prev_vpa = 0, prev_addw = 0;
  int n_decide = 0;
  always @(negedge clk) begin
    if (dut.u_getw.t4_ack != prev_t4) n_times4++;
    if (dut.vportack_ack != prev_vpa) n_decide++;
    if (dut.addw_req != prev_addw) n_add++;
    prev_t4   <= dut.u_getw.t4_ack;
    prev_vpa  <= dut.vportack_ack;
    prev_addw <= dut.addw_req;
  end

  function automatic int isqrt(input int a);
    int z = 0;
    while ((z + 1) * (z + 1) <= a) z++;
    return z;
  endfunction

  int sent [$];

  // producer: offers the numbers back to back
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    for (int a = 0; a < NA; a++) begin
      while (get_ack != get_req) @(negedge clk);
      if (final_req != final_ack || sent.size() > 0) n_overlap++;
      get_data = W'(a);
      sent.push_back(a);
      get_req = ~get_req;
      @(negedge clk);
    end
  end

  // consumer
  initial begin
    int a;
    for (int k = 0; k < NA; k++) begin
      while (final_req == final_ack) @(negedge clk);
      a = sent.pop_front();
      checks++;
      if (final_data !== W'(isqrt(a))) begin
        failures++; $display("FAIL a=%0d z=%0d exp=%0d", a, final_data, isqrt(a));
      end
      final_ack = final_req;
      @(negedge clk);
    end
    n_keep = n_decide - n_add;
    checks++; if (n_times4 == 0) begin failures++; $display("FAIL no times4"); end
    checks++; if (n_add == 0 || n_keep == 0) begin failures++; $display("FAIL t branch missing"); end
    checks++; if (n_overlap == 0) begin failures++; $display("FAIL no overlap"); end
    $display("times4=%0d add=%0d keep=%0d overlap=%0d", n_times4, n_add, n_keep, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
