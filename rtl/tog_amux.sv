// tog_amux -- asynchronous multiplexer of two bundled-data channels.
//
// Two input channels A (areq, a, aack) and B (breq, b, back) share one output
// channel C (creq, c, cack). A request on A (or B) copies its data to c and
// toggles creq; when the receiver answers on cack, the multiplexer toggles
// aack (or back). The two inputs are used by mutually exclusive branches of a
// process; should both be pending at once, A is served first. Each step takes
// one clock. clr_n is the active-low clear.
module tog_amux #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic         areq,
  input  logic [W-1:0] a,
  output logic         aack,
  input  logic         breq,
  input  logic [W-1:0] b,
  output logic         back,
  output logic         creq,
  output logic [W-1:0] c,
  input  logic         cack
);
  logic busy, sel_b;

  always_ff @(posedge clk) begin
    if (!clr_n) begin
      {aack, back, creq, busy, sel_b} <= '0;
      c <= '0;
    end else if (!busy) begin
      if (areq != aack) begin
        c <= a; creq <= ~creq; sel_b <= 1'b0; busy <= 1'b1;
      end else if (breq != back) begin
        c <= b; creq <= ~creq; sel_b <= 1'b1; busy <= 1'b1;
      end
    end else if (cack == creq) begin
      busy <= 1'b0;
      if (sel_b) back <= ~back;
      else       aack <= ~aack;
    end
  end
endmodule
