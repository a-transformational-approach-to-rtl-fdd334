// tog_xor -- transition merge (XOR) of N inputs.
//
// In transition signalling an XOR gate is the merge element: its output
// toggles whenever any one input toggles. It is used where one control point
// is reached from several mutually exclusive places, e.g. the start of a
// process and its tail calls. Purely combinational; inputs must not toggle in
// the same cycle (they come from mutually exclusive branches).
module tog_xor #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] in,
  output logic         out
);
  always_comb out = ^in;
endmodule
