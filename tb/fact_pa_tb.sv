// fact_pa_tb -- sends random lists of numbers on mult, then senda, and
// checks that result carries their product (mod 2**ACC_W) and that a
// restarts at 1. Checks that mult is acknowledged before the product is
// ready (the multiplier runs in the background, MUL_LAT = 4 here) and that
// the next mult is held off until it is.
module fact_pa_tb;
  localparam int W = 8, ACC_W = 32, LAT = 4;
  logic clk = 0, clr_n = 0;
  logic mult_req = 0, mult_ack, senda_req = 0, senda_ack, result_req, result_ack = 0, mul_busy;
  logic [W-1:0] mult_data = '0;
  logic [ACC_W-1:0] result_data;
  int checks = 0, failures = 0, overlapped = 0;
  always #5 clk = ~clk;

  fact_pa #(.W(W), .ACC_W(ACC_W), .MUL_LAT(LAT)) dut (
    .clk, .clr_n, .mult_req, .mult_data, .mult_ack, .senda_req, .senda_ack,
    .result_req, .result_data, .result_ack, .mul_busy);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ACC_W-1:0] prod;
    int k, cyc;
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    for (int r = 0; r < 40; r++) begin
      prod = 1;
      k = $urandom_range(6);
      for (int j = 0; j < k; j++) begin
        mult_data = W'($urandom);
        prod = prod * ACC_W'(mult_data);
        mult_req = ~mult_req;
        cyc = 0;
        while (mult_ack != mult_req) begin @(negedge clk); cyc++; end
        if (mul_busy) overlapped++;
        checks++;
        if (j > 0 && cyc < LAT) begin failures++; $display("FAIL mult accepted during multiply"); end
      end
      senda_req = ~senda_req;
      while (result_req == result_ack) @(negedge clk);
      checks++;
      if (result_data !== prod) begin
        failures++; $display("FAIL r=%0d result=%0d exp=%0d", r, result_data, prod);
      end
      repeat ($urandom_range(3)) @(negedge clk);
      result_ack = ~result_ack;
      @(negedge clk);
    end
    checks++;
    if (overlapped == 0) begin failures++; $display("FAIL no background multiply seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
