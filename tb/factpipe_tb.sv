// factpipe_tb -- plays process pa and the environment around factpipe.
// pa's side acknowledges mult and senda after random delays and records
// every n sent on mult. After START, factpipe must send senda at once (n
// starts at 0); for each argument n given on again it must then send
// n, n-1, ..., 1 on mult, in that order, followed by one senda, and
// acknowledge again (AGAIN_OUT) once.
module factpipe_tb;
  localparam int W = 8;
  logic clk = 0, CLR = 0, START = 0;
  logic SENDA_OUT, SENDA_IN = 0, AGAIN_IN = 0, AGAIN_OUT, MULT_OUT, MULT_IN = 0;
  logic [W-1:0] AGAIN_DATA = '0, MULT_DATA;
  int checks = 0, failures = 0, sendas = 0;
  int mults [$];
  always #5 clk = ~clk;

  factpipe #(.W(W)) dut (.clk, .CLR, .START, .SENDA_OUT, .SENDA_IN, .AGAIN_IN,
                         .AGAIN_DATA, .AGAIN_OUT, .MULT_OUT, .MULT_IN, .MULT_DATA);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pa's side of mult!n
  initial forever begin
    @(negedge clk);
    if (MULT_OUT != MULT_IN) begin
      mults.push_back(int'(MULT_DATA));
      repeat ($urandom_range(3)) @(negedge clk);
      MULT_IN = MULT_OUT;
    end
  end

  // pa's side of senda!
  initial forever begin
    @(negedge clk);
    if (SENDA_OUT != SENDA_IN) begin
      sendas++;
      repeat ($urandom_range(3)) @(negedge clk);
      SENDA_IN = SENDA_OUT;
    end
  end

  task automatic wait_sendas(input int k);
    int guard = 0;
    while (sendas < k && guard < 5000) begin @(negedge clk); guard++; end
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    @(negedge clk) CLR = 1;
    @(negedge clk) START = 1;
    wait_sendas(1);
    checks++;
    if (sendas != 1 || mults.size() != 0) begin failures++; $display("FAIL start"); end
    for (int r = 0; r < 30; r++) begin
      n = (r == 0) ? 0 : (r == 1) ? 255 : $urandom_range(20);
      mults.delete();
      repeat ($urandom_range(4)) @(negedge clk);
      AGAIN_DATA = W'(n);
      AGAIN_IN = ~AGAIN_IN;
      wait_sendas(r + 2);
      checks++;
      if (AGAIN_OUT !== AGAIN_IN) begin failures++; $display("FAIL again not acknowledged"); end
      checks++;
      if (mults.size() != n) begin
        failures++; $display("FAIL n=%0d got %0d mults", n, mults.size());
      end else begin
        for (int k = 0; k < n; k++) begin
          checks++;
          if (mults[k] != n - k) begin failures++; $display("FAIL n=%0d mult %0d = %0d", n, k, mults[k]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
