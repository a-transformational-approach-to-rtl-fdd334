// sqrt_after_getw -- loop process of the pipelined integer square root.
//
//   after_getw[w,t,u] <= (w <= 2)     -> send_final_answer! -> psqrt[]
//                      | (not w <= 2) -> w := w/4 -> div2minusvw!w -> vport!
//                           -> vportack?v1 -> t := u + v1
//                           -> (t > 0)     -> after_getw[w,t,u]
//                            | (not t > 0) -> addw!w -> after_getw[w,t,t]
//
// The loop variable v lives in process pv; this process only tells pv what
// to do with it (div2minusvw: v := (v-w)/2, addw: v := v+w) and asks for its
// value (vport, answered on vportack). pv acknowledges addw as soon as it
// has w, so the next turn's w/4 and test overlap pv's addition.
//
// Built as a netlist of handshake elements:
//   * go (w, u; t = 0) loads u through AMUX_u input B, whose acknowledge
//     loads w through AMUX_w input B; that acknowledge enters the XOR merge.
//   * The XOR merge (loop entry: start, t > 0, addw acknowledged) starts the
//     le2 test. T is the send_final_answer request; its acknowledge is also
//     the acknowledge of go.
//   * F runs fab_div4; its result is written to w through AMUX_w input A,
//     and that AMUX acknowledge is the div2minusvw request (data w).
//   * The div2minusvw acknowledge is the vport request.
//   * A C-element waits for the vport acknowledge and the vportack request;
//     it starts fab_plus, t = u + v1, whose completion acknowledges vportack
//     and starts the gt0 test.
//   * gt0 T re-enters the XOR merge. F writes t to u through AMUX_u input A;
//     that acknowledge is the addw request (data w), and the addw acknowledge
//     re-enters the XOR merge.
// Channel names follow the netlist ports (DIV2MINUSVW_OUT/IN/DATA,
// ADDW_OUT/IN, VPORTACK_DATA): *_out is a request, *_in its acknowledge.
// vportack is an input channel (vportack_req, vportack_data, answered on
// vportack_ack). Data are W-bit two's complement; one clock per element.
module sqrt_after_getw #(
  parameter int unsigned W = shilpa_pkg::SQRT_W
) (
  input  logic                clk,
  input  logic                clr_n,
  input  logic                go_req,
  input  logic [W-1:0]        go_w,
  input  logic signed [W-1:0] go_u,
  output logic                go_ack,
  output logic                div2minusvw_out,
  output logic [W-1:0]        div2minusvw_data,
  input  logic                div2minusvw_in,
  output logic                vport_out,
  input  logic                vport_in,
  input  logic                vportack_req,
  input  logic signed [W-1:0] vportack_data,
  output logic                vportack_ack,
  output logic                addw_out,
  output logic [W-1:0]        addw_data,
  input  logic                addw_in,
  output logic                sfa_out,
  input  logic                sfa_in
);
  import shilpa_pkg::*;

  logic         u_back, u_creq, u_cack, w_back, w_creq, w_cack;
  logic         le2_req, le2_f, div4_ack, join_out, gt0_t, gt0_f;
  logic [W-1:0] u_c, u_q, w_c, w_q, div4_y, t_q;

  // u: from go (B) or from t (A)
  tog_amux #(.W(W)) u_amux_u (.clk, .clr_n,
    .areq(gt0_f), .a(t_q), .aack(addw_out), .breq(go_req), .b(go_u), .back(u_back),
    .creq(u_creq), .c(u_c), .cack(u_cack));
  tog_reg #(.W(W)) u_reg_u (.clk, .clr_n, .req(u_creq), .ack(u_cack), .d(u_c), .q(u_q));

  // w: from go (B) or from w/4 (A)
  tog_amux #(.W(W)) u_amux_w (.clk, .clr_n,
    .areq(div4_ack), .a(div4_y), .aack(div2minusvw_out), .breq(u_back), .b(go_w), .back(w_back),
    .creq(w_creq), .c(w_c), .cack(w_cack));
  tog_reg #(.W(W)) u_reg_w (.clk, .clr_n, .req(w_creq), .ack(w_cack), .d(w_c), .q(w_q));

  tog_xor #(.N(3)) u_xor (.in({addw_in, gt0_t, w_back}), .out(le2_req));

  tog_test #(.W(W), .OP(TEST_LE2)) u_le2 (
    .clk, .clr_n, .a(w_q), .b('0), .req(le2_req), .t(sfa_out), .f(le2_f));

  tog_fab #(.W(W), .OP(FAB_DIV4)) u_fab_div4 (
    .clk, .clr_n, .a(w_q), .b('0), .req(le2_f), .y(div4_y), .ack(div4_ack));

  tog_celem u_c_vport (.clk, .mc_n(clr_n), .a(vport_in), .b(vportack_req), .out(join_out));

  tog_fab #(.W(W), .OP(FAB_PLUS)) u_fab_plus (
    .clk, .clr_n, .a(u_q), .b(vportack_data), .req(join_out), .y(t_q), .ack(vportack_ack));

  tog_test #(.W(W), .OP(TEST_GT0)) u_gt0 (
    .clk, .clr_n, .a(t_q), .b('0), .req(vportack_ack), .t(gt0_t), .f(gt0_f));

  assign vport_out        = div2minusvw_in;
  assign go_ack           = sfa_in;
  assign div2minusvw_data = w_q;
  assign addw_data        = w_q;
endmodule
