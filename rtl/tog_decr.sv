// tog_decr -- decrementer function action block (decr).
//
// A toggle on req computes y = a - 1 (modulo 2**W) into an output register
// and toggles ack in the same clock edge, so y is valid when ack toggles.
// a must be stable from the request until ack. clr_n is the active-low CLR.
module tog_decr #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic [W-1:0] a,
  input  logic         req,
  output logic [W-1:0] y,
  output logic         ack
);
  always_ff @(posedge clk) begin
    if (!clr_n) begin
      y   <= '0;
      ack <= 1'b0;
    end else if (req != ack) begin
      y   <= a - W'(1);
      ack <= req;
    end
  end
endmodule
