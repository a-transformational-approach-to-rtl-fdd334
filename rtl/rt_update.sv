// rt_update -- refined register transfer x <- f(x, y).
//
// The circuit a register-transfer action expands into. A toggle on go starts
// the transfer:
//   1. argument registers arg_1 <- x and arg_2 <- y load in parallel;
//   2. a C-element joins their two load acknowledges and toggles fab_init,
//      the start of the function action block FAB_f (outside this module,
//      since f is whatever function the source program applies);
//   3. FAB_f's completion (fab_done, result on fab_r) loads the result
//      register rslt;
//   4. rslt's acknowledge loads register x with the result;
//   5. x's acknowledge is the done toggle: the transfer is complete.
// fab_a and fab_b are the two FAB_f arguments (arg_1, arg_2). x starts at 0
// after clear (own choice). Every step costs one clock, so done follows go
// by 3 clocks plus the FAB_f time.
module rt_update #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic         go,
  output logic         done,
  input  logic [W-1:0] y,
  output logic [W-1:0] x,
  output logic         fab_init,
  input  logic         fab_done,
  output logic [W-1:0] fab_a,
  output logic [W-1:0] fab_b,
  input  logic [W-1:0] fab_r
);
  logic arg1_ack, arg2_ack, rslt_ack;
  logic [W-1:0] rslt_q;

  tog_reg #(.W(W)) u_arg1 (.clk, .clr_n, .req(go), .ack(arg1_ack), .d(x), .q(fab_a));
  tog_reg #(.W(W)) u_arg2 (.clk, .clr_n, .req(go), .ack(arg2_ack), .d(y), .q(fab_b));
  tog_celem u_join (.clk, .mc_n(clr_n), .a(arg1_ack), .b(arg2_ack), .out(fab_init));
  tog_reg #(.W(W)) u_rslt (.clk, .clr_n, .req(fab_done), .ack(rslt_ack), .d(fab_r), .q(rslt_q));
  tog_reg #(.W(W)) u_regx (.clk, .clr_n, .req(rslt_ack), .ack(done), .d(rslt_q), .q(x));
endmodule
