// bcell -- broadcast C-element (BCell) of an N-receiver input channel.
//
// The cell has N+1 inputs and N outputs. Input ctl carries the sender's
// transition (its request, issued by the output action p!E); input in[i]
// carries receiver i's transition announcing that it is ready to receive.
// As soon as both in[i] and ctl have transitioned, out[i] transitions and
// loads receiver i's register. One C-element per receiver implements this
// rule; each adds one clock of delay in this synchronous model.
module bcell #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic         ctl,
  input  logic [N-1:0] in,
  output logic [N-1:0] out
);
  for (genvar i = 0; i < N; i++) begin : g_c
    tog_celem u_c (.clk, .mc_n(clr_n), .a(in[i]), .b(ctl), .out(out[i]));
  end
endmodule
