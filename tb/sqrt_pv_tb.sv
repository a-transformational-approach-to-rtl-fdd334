// sqrt_pv_tb -- random sequence of pv's five commands against a model of v:
// initv (v := value), div2minusvw (v := (v-w)/2), addw (v := v+w), vport
// (must answer with v on vportack) and send_final_answer (must answer with
// (v-1)/2 on final_answer). Values are kept positive as in the algorithm.
module sqrt_pv_tb;
  localparam int W = 16;
  logic clk = 0, clr_n = 0;
  logic d2_req = 0, d2_ack, vport_req = 0, vport_ack, vpa_req, vpa_ack = 0;
  logic addw_req = 0, addw_ack, sfa_req = 0, sfa_ack, final_req, final_ack = 0;
  logic initv_req = 0, initv_ack;
  logic [W-1:0] d2_data = '0, addw_data = '0;
  logic signed [W-1:0] vpa_data, final_data, initv_data = '0;
  int checks = 0, failures = 0;
  int seen [5] = '{default: 0};
  always #5 clk = ~clk;

  sqrt_pv #(.W(W)) dut (.clk, .clr_n,
    .div2minusvw_req(d2_req), .div2minusvw_data(d2_data), .div2minusvw_ack(d2_ack),
    .vport_req, .vport_ack, .vportack_req(vpa_req), .vportack_data(vpa_data), .vportack_ack(vpa_ack),
    .addw_req, .addw_data, .addw_ack, .sfa_req, .sfa_ack,
    .final_req, .final_data, .final_ack, .initv_req, .initv_data, .initv_ack);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, op, w;
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    v = 0;
    for (int r = 0; r < 400; r++) begin
      op = (r == 0) ? 4 : $urandom_range(4);
      seen[op]++;
      case (op)
        0: begin  // div2minusvw
          w = $urandom_range(v < 0 ? 0 : v);
          d2_data = W'(w); d2_req = ~d2_req;
          while (d2_ack != d2_req) @(negedge clk);
          v = (v - w) >>> 1;
        end
        1: begin  // vport / vportack
          vport_req = ~vport_req;
          while (vpa_req == vpa_ack) @(negedge clk);
          checks++;
          if (vport_ack !== vport_req || vpa_data !== W'(v)) begin
            failures++; $display("FAIL vport v=%0d got %0d", v, vpa_data);
          end
          vpa_ack = vpa_req;
        end
        2: begin  // addw
          w = $urandom_range(1000);
          addw_data = W'(w); addw_req = ~addw_req;
          while (addw_ack != addw_req) @(negedge clk);
          v = v + w;
        end
        3: begin  // send_final_answer
          sfa_req = ~sfa_req;
          while (final_req == final_ack) @(negedge clk);
          checks++;
          if (sfa_ack !== sfa_req || final_data !== W'((v - 1) >>> 1)) begin
            failures++; $display("FAIL final v=%0d got %0d", v, final_data);
          end
          final_ack = final_req;
        end
        default: begin  // initv
          v = $urandom_range(16000) + 1;
          initv_data = W'(v); initv_req = ~initv_req;
          while (initv_ack != initv_req) @(negedge clk);
        end
      endcase
      @(negedge clk);
    end
    for (int i = 0; i < 5; i++) begin
      checks++; if (seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
