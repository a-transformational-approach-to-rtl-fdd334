// tog_celem -- two-input Muller C-element with master clear.
//
// The output takes the value of the inputs when both agree and otherwise
// holds. In transition signalling this joins two events: the output toggles
// once both inputs have toggled. The element is modelled synchronously: the
// output is a flip-flop updated on the rising clock edge, so each C-element
// adds one clock of delay. mc_n is the active-low master clear (the MC pin)
// and forces the output to 0.
module tog_celem (
  input  logic clk,
  input  logic mc_n,
  input  logic a,
  input  logic b,
  output logic out
);
  always_ff @(posedge clk) begin
    if (!mc_n)       out <= 1'b0;
    else if (a == b) out <= a;
  end
endmodule
