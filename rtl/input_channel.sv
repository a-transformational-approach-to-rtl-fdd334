// input_channel -- refined input rendezvous p?y for N receivers.
//
// This is the circuit an input action expands into: a broadcast C-element
// (bcell), one data register per receiver and a completion tree (ctree).
//   * The sender puts its value on data and toggles ctl (its request).
//   * Receiver i toggles rdy[i] when it reaches the input action.
//   * bcell fires out[i] once both have toggled; out[i] loads register i
//     with data, and the register's ldack goes to the completion tree.
//   * The tree's output is the sender's acknowledge (done): every receiver
//     has latched the value, so data may change.
// Receiver i's own acknowledge rx_ack[i] is, with BROADCAST = 0 (multicast),
// its register's ldack; with BROADCAST = 1 it is the completion tree output
// for every receiver, so no receiver proceeds before all have the value.
// y[i] is the value held for receiver i.
module input_channel #(
  parameter int unsigned W         = 8,
  parameter int unsigned N         = 2,
  parameter bit          BROADCAST = 1'b0
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic         ctl,
  input  logic [W-1:0] data,
  output logic         done,
  input  logic [N-1:0] rdy,
  output logic [N-1:0] rx_ack,
  output logic [W-1:0] y [N]
);
  logic [N-1:0] ld, ldack;

  bcell #(.N(N)) u_bcell (.clk, .clr_n, .ctl, .in(rdy), .out(ld));

  for (genvar i = 0; i < N; i++) begin : g_rx
    tog_reg #(.W(W)) u_reg (.clk, .clr_n, .req(ld[i]), .ack(ldack[i]), .d(data), .q(y[i]));
  end

  ctree #(.N(N)) u_ctree (.clk, .clr_n, .in(ldack), .out(done));

  assign rx_ack = BROADCAST ? {N{done}} : ldack;
endmodule
