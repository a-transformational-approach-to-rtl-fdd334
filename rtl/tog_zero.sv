// tog_zero -- zero test with a two-way transition answer (ZERO).
//
// A toggle on req asks whether a is zero. One clock later the module toggles
// t if a == 0 and f otherwise, so the outputs steer control into the "true"
// or "false" branch of a guarded choice. a must be stable from the request
// until the answer (bundled data). clr_n is the active-low CLR.
module tog_zero #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic [W-1:0] a,
  input  logic         req,
  output logic         t,
  output logic         f
);
  logic seen;   // phase of the last request answered

  always_ff @(posedge clk) begin
    if (!clr_n) begin
      {seen, t, f} <= '0;
    end else if (req != seen) begin
      seen <= req;
      if (a == '0) t <= ~t;
      else         f <= ~f;
    end
  end
endmodule
