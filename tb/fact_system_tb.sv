// fact_system_tb -- end-to-end factorial: after start the circuit must
// deliver 0! = 1, then n! (mod 2**ACC_W) for every n given on again. The
// multiplier latency is set to 4 clocks so that pa's multiplication visibly
// overlaps factpipe's decrement and zero test; the test counts those
// overlapping cycles and requires some.
module fact_system_tb;
  localparam int W = 8, ACC_W = 32, LAT = 4;
  logic clk = 0, clr_n = 0, start = 0;
  logic again_req = 0, again_ack, result_req, result_ack = 0, mul_busy;
  logic [W-1:0] again_data = '0;
  logic [ACC_W-1:0] result_data;
  int checks = 0, failures = 0, overlap = 0;
  always #5 clk = ~clk;

  fact_system #(.W(W), .ACC_W(ACC_W), .MUL_LAT(LAT)) dut (
    .clk, .clr_n, .start, .again_req, .again_data, .again_ack,
    .result_req, .result_data, .result_ack, .mul_busy);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pa multiplying while factpipe is not waiting on mult
  always @(posedge clk)
    if (mul_busy && dut.u_factpipe.MULT_OUT == dut.u_factpipe.MULT_IN) overlap++;

  function automatic logic [ACC_W-1:0] fact(input int n);
    logic [ACC_W-1:0] f = 1;
    for (int i = 2; i <= n; i++) f = f * ACC_W'(i);
    return f;
  endfunction

  task automatic take_result(input logic [ACC_W-1:0] exp, input int n);
    while (result_req == result_ack) @(negedge clk);
    checks++;
    if (result_data !== exp) begin
      failures++; $display("FAIL n=%0d result=%0d exp=%0d", n, result_data, exp);
    end
    repeat ($urandom_range(2)) @(negedge clk);
    result_ack = ~result_ack;
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    @(negedge clk) clr_n = 1;
    @(negedge clk) start = 1;
    take_result(1, 0);
    for (int r = 0; r < 25; r++) begin
      n = (r < 13) ? r : $urandom_range(40);
      @(negedge clk);
      again_data = W'(n);
      again_req = ~again_req;
      take_result(fact(n), n);
      checks++;
      if (again_ack !== again_req) begin failures++; $display("FAIL again ack"); end
    end
    checks++;
    if (overlap == 0) begin failures++; $display("FAIL no overlap of multiply and decrement"); end
    $display("overlapping cycles: %0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
