// refine_example -- the process S[x] <= p?y -> S[f(x,y)] after refinement.
//
// A process that forever receives y on channel p and replaces its state x by
// f(x, y). It is the running example of action refinement and is built only
// from the refined pieces:
//   * input_channel: the rendezvous p?y, shared by N receivers; S is
//     receiver 0, receivers 1..N-1 are brought out as ports;
//   * rt_update: the register transfer x <- f(x, y) with FAB_f outside;
//   * tog_xor: merges the start event and the tail call (rt_update done)
//     into S's "ready to receive" transition.
// Timing: after S's register has latched y (multicast acknowledge) the update
// starts at once; S is ready for the next value when x has been written.
module refine_example #(
  parameter int unsigned W         = 8,
  parameter int unsigned N         = 2,
  parameter bit          BROADCAST = 1'b0
) (
  input  logic           clk,
  input  logic           clr_n,
  input  logic           start,
  // channel p, sender side
  input  logic           p_ctl,
  input  logic [W-1:0]   p_data,
  output logic           p_done,
  // the other receivers of p
  input  logic [N-2:0]   rx_rdy,
  output logic [N-2:0]   rx_ack,
  output logic [W-1:0]   rx_y [N-1],
  // state of S and its function action block
  output logic [W-1:0]   x,
  output logic           fab_init,
  input  logic           fab_done,
  output logic [W-1:0]   fab_a,
  output logic [W-1:0]   fab_b,
  input  logic [W-1:0]   fab_r
);
  logic [N-1:0] rdy, ack;
  logic [W-1:0] y [N];
  logic         s_ready, upd_done;

  tog_xor #(.N(2)) u_merge (.in({upd_done, start}), .out(s_ready));

  assign rdy = {rx_rdy, s_ready};

  input_channel #(.W(W), .N(N), .BROADCAST(BROADCAST)) u_p (
    .clk, .clr_n, .ctl(p_ctl), .data(p_data), .done(p_done),
    .rdy, .rx_ack(ack), .y);

  assign rx_ack = ack[N-1:1];
  for (genvar i = 1; i < N; i++) begin : g_y
    assign rx_y[i-1] = y[i];
  end

  rt_update #(.W(W)) u_upd (
    .clk, .clr_n, .go(ack[0]), .done(upd_done), .y(y[0]), .x,
    .fab_init, .fab_done, .fab_a, .fab_b, .fab_r);
endmodule
