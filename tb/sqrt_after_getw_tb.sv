// sqrt_after_getw_tb -- plays getw and pv around the loop process. For a
// random a it starts the loop with the w and u = -a that getw would send and
// keeps v itself, answering div2minusvw, vport, addw and send_final_answer
// like pv. Checks: the w sent on each command follows the reference loop
// (w/4 each turn), addw is sent exactly when u + v <= 0, send_final_answer
// comes when w <= 2, and (v-1)/2 then equals floor(sqrt(a)). Both branches
// of the t > 0 test must occur.
module sqrt_after_getw_tb;
  localparam int W = 16;
  logic clk = 0, clr_n = 0, go_req = 0, go_ack;
  logic [W-1:0] go_w = '0, d2_data, addw_data;
  logic signed [W-1:0] go_u = '0, vpa_data = '0;
  logic d2_req, d2_ack = 0, vport_req, vport_ack = 0, vpa_req = 0, vpa_ack;
  logic addw_req, addw_ack = 0, sfa_req, sfa_ack = 0;
  int checks = 0, failures = 0, n_add = 0, n_keep = 0;
  always #5 clk = ~clk;

  sqrt_after_getw #(.W(W)) dut (.clk, .clr_n, .go_req, .go_w, .go_u, .go_ack,
    .div2minusvw_out(d2_req), .div2minusvw_data(d2_data), .div2minusvw_in(d2_ack),
    .vport_out(vport_req), .vport_in(vport_ack),
    .vportack_req(vpa_req), .vportack_data(vpa_data), .vportack_ack(vpa_ack),
    .addw_out(addw_req), .addw_data, .addw_in(addw_ack), .sfa_out(sfa_req), .sfa_in(sfa_ack));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int isqrt(input int a);
    int z = 0;
    while ((z + 1) * (z + 1) <= a) z++;
    return z;
  endfunction

  initial begin
    int a, w, v, u, t;
    bit fin;
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    for (int r = 0; r < 150; r++) begin
      a = (r == 0) ? 0 : (r == 1) ? 4095 : $urandom_range(4095);
      w = 2;
      while (2 * a >= w) w = 4 * w;
      v = w / 2; u = -a;
      go_w = W'(w); go_u = W'(u); go_req = ~go_req;
      fin = 0;
      while (!fin) begin
        @(negedge clk);
        if (d2_req != d2_ack) begin
          w = w / 4;
          checks++;
          if (d2_data !== W'(w)) begin failures++; $display("FAIL a=%0d d2 w=%0d exp=%0d", a, d2_data, w); end
          v = (v - w) / 2;
          t = u + v;
          d2_ack = d2_req;
        end else if (vport_req != vport_ack) begin
          vport_ack = vport_req;
          @(negedge clk);
          vpa_data = W'(v); vpa_req = ~vpa_req;
          while (vpa_ack != vpa_req) @(negedge clk);
          // wait for after_getw's decision on t = u + v: an addw request,
          // or the next turn's div2minusvw or send_final_answer request
          for (int g = 0; g < 20 && addw_req == addw_ack && d2_req == d2_ack
                          && sfa_req == sfa_ack; g++) @(negedge clk);
          checks++;
          if ((addw_req != addw_ack) != (t <= 0)) begin
            failures++; $display("FAIL a=%0d branch t=%0d", a, t);
          end
          if (t <= 0) begin
            n_add++;
            checks++;
            if (addw_data !== W'(w)) begin failures++; $display("FAIL addw data"); end
            u = t; v = v + w;
            addw_ack = addw_req;
          end else n_keep++;
        end else if (sfa_req != sfa_ack) begin
          checks++;
          if (w > 2) begin failures++; $display("FAIL early final w=%0d", w); end
          checks++;
          if ((v - 1) / 2 != isqrt(a)) begin failures++; $display("FAIL a=%0d z=%0d", a, (v - 1) / 2); end
          sfa_ack = sfa_req;
          while (go_ack != go_req) @(negedge clk);
          fin = 1;
        end
      end
    end
    checks++;
    if (n_add == 0 || n_keep == 0) begin failures++; $display("FAIL a branch never taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
