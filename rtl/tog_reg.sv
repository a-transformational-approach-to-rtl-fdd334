// tog_reg -- transition-controlled data register ("reg8" / Reg).
//
// A toggle on req (the ld pin) loads d into q and is answered by a toggle on
// ack (ldack) in the same clock edge, so q is valid when ack toggles. A
// request is pending while req != ack. clr_n (active-low CLR) empties the
// register and returns the handshake to its idle phase. Width is a
// parameter; 8 is the width of the library register in the netlists.
module tog_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic         req,
  output logic         ack,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!clr_n) begin
      q   <= '0;
      ack <= 1'b0;
    end else if (req != ack) begin
      q   <= d;
      ack <= req;
    end
  end
endmodule
