// fact_pipeline_tb -- measures what software pipelining buys the factorial.
//
// Two factorial circuits built from the same elements run the same arguments
// side by side: the pipelined one (factpipe || pa, pa multiplies in the
// background) and the unpipelined one (the driver waits for each product
// before decrementing). This is repeated for multiplier latencies of 1, 4
// and 8 clocks. For every argument both must return n! (mod 2**32), and for
// every n >= 1 the pipelined circuit must answer in fewer clocks than the
// unpipelined one. The number of clocks from the again request to the result
// is printed for both.
module fact_pipeline_tb;
  localparam int W = 8, ACC_W = 32;
  logic clk = 0, clr_n = 0, start = 0;
  logic again_req = 0;
  logic [W-1:0] again_data = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  function automatic logic [ACC_W-1:0] fact(input int n);
    logic [ACC_W-1:0] f = 1;
    for (int i = 2; i <= n; i++) f = f * ACC_W'(i);
    return f;
  endfunction

  // one pipelined and one unpipelined circuit per multiplier latency
  localparam int NL = 3;
  localparam int LATS [NL] = '{1, 4, 8};
  logic [NL-1:0]    p_ack, s_ack, p_rreq, s_rreq, p_busy, s_busy;
  logic [NL-1:0]    p_rack = '0, s_rack = '0;
  logic [ACC_W-1:0] p_res [NL], s_res [NL];

  for (genvar i = 0; i < NL; i++) begin : g_lat
    fact_system #(.W(W), .ACC_W(ACC_W), .MUL_LAT(LATS[i]), .PIPELINED(1'b1)) u_pipe (
      .clk, .clr_n, .start, .again_req, .again_data, .again_ack(p_ack[i]),
      .result_req(p_rreq[i]), .result_data(p_res[i]), .result_ack(p_rack[i]), .mul_busy(p_busy[i]));
    fact_system #(.W(W), .ACC_W(ACC_W), .MUL_LAT(LATS[i]), .PIPELINED(1'b0)) u_seq (
      .clk, .clr_n, .start, .again_req, .again_data, .again_ack(s_ack[i]),
      .result_req(s_rreq[i]), .result_data(s_res[i]), .result_ack(s_rack[i]), .mul_busy(s_busy[i]));
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Wait until every circuit has offered its result, note after how many
  // clocks each did, check the values and acknowledge them all.
  task automatic collect(input int n, output int tp [NL], output int ts [NL]);
    logic [NL-1:0] pd = '0, sd = '0;
    int cyc = 0;
    while (!(&pd && &sd)) begin
      @(posedge clk); #1;
      cyc++;
      for (int i = 0; i < NL; i++) begin
        if (!pd[i] && p_rreq[i] != p_rack[i]) begin pd[i] = 1; tp[i] = cyc; end
        if (!sd[i] && s_rreq[i] != s_rack[i]) begin sd[i] = 1; ts[i] = cyc; end
      end
    end
    for (int i = 0; i < NL; i++) begin
      checks += 2;
      if (p_res[i] !== fact(n)) begin
        failures++; $display("FAIL pipelined lat=%0d n=%0d got %0d", LATS[i], n, p_res[i]);
      end
      if (s_res[i] !== fact(n)) begin
        failures++; $display("FAIL unpipelined lat=%0d n=%0d got %0d", LATS[i], n, s_res[i]);
      end
    end
    @(negedge clk);
    p_rack = p_rreq;
    s_rack = s_rreq;
  endtask

  initial begin
    int tp [NL], ts [NL];
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    @(negedge clk) start = 1;
    collect(0, tp, ts);
    $display("   n | clocks pipelined / unpipelined, multiplier latency 1, 4, 8");
    for (int n = 0; n <= 12; n++) begin
      @(negedge clk);
      again_data = W'(n);
      again_req  = ~again_req;
      collect(n, tp, ts);
      $display("  %2d | %4d / %4d   %4d / %4d   %4d / %4d",
               n, tp[0], ts[0], tp[1], ts[1], tp[2], ts[2]);
      for (int i = 0; i < NL; i++) begin
        checks++;
        if (n >= 1 && tp[i] >= ts[i]) begin
          failures++;
          $display("FAIL lat=%0d n=%0d: pipelined %0d clocks, unpipelined %0d", LATS[i], n, tp[i], ts[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
