// sqrt_getw -- front of the pipelined integer square root (psqrt, getw).
//
//   isqrt[]          <= get_number?a -> getw[2, 2a, a]
//   getw[w,twicea,a] <= (twicea < w)     -> after_getw[w, w/2, 0, -a]
//                     | (not twicea < w) -> getw[4w, twicea, a]
//
// Receives a on get_number, finds the smallest w = 2*4^k with 2a < w, hands
// the initial v = w/2 to process pv over initv, and starts the loop process
// after_getw over channel go with w and u = -a (t starts at 0 there).
//
// Built as a netlist of handshake elements in the style of the synthesized
// circuits:
//   * C-element c_get joins a get_number request with the "free" event,
//     the inverted go acknowledge (so the first request passes at once and
//     each later one after the previous loop has finished); it loads reg_a,
//     whose acknowledge is get_ack.
//   * fab_mult2 forms 2a; its completion loads w = 2 through AMUX input B.
//   * Each load of w re-enters the XOR merge and starts the LT test
//     2a < w. F runs fab_times4, whose result goes back through AMUX input
//     A (tail call getw[4w,...]); T runs fab_div2, whose completion is the
//     initv request with v = w/2.
//   * The initv acknowledge runs fab_neg (u = -a); its completion is the go
//     request, bundled with w and u.
// Channels are two-phase with bundled data; *_out is a request and *_in its
// acknowledge, as in the netlist port names INITV_OUT / INITV_IN. Data are
// W-bit two's complement and w must not overflow, so a < 2**(W-4).
// Timing, one clock per element: initv follows a get_number request after
// 8 + 5k clocks, k being the number of multiplications by 4; go follows the
// initv acknowledge after 1 clock.
module sqrt_getw #(
  parameter int unsigned W = shilpa_pkg::SQRT_W
) (
  input  logic                clk,
  input  logic                clr_n,
  input  logic                get_req,
  input  logic [W-1:0]        get_data,
  output logic                get_ack,
  output logic                initv_out,
  output logic signed [W-1:0] initv_data,
  input  logic                initv_in,
  output logic                go_out,
  output logic [W-1:0]        go_w,
  output logic signed [W-1:0] go_u,
  input  logic                go_in
);
  import shilpa_pkg::*;

  logic         get_fire, m2_ack, t4_ack, aack, back, creq, cack, lt_req, lt_t, lt_f;
  logic [W-1:0] a_q, twicea, t4_y, amux_c, w_q, v0, u0;

  tog_celem u_c_get (.clk, .mc_n(clr_n), .a(get_req), .b(~go_in), .out(get_fire));

  tog_reg #(.W(W)) u_reg_a (.clk, .clr_n, .req(get_fire), .ack(get_ack), .d(get_data), .q(a_q));

  tog_fab #(.W(W), .OP(FAB_MULT2)) u_fab_mult2 (
    .clk, .clr_n, .a(a_q), .b('0), .req(get_ack), .y(twicea), .ack(m2_ack));

  tog_amux #(.W(W)) u_amux_w (.clk, .clr_n,
    .areq(t4_ack), .a(t4_y), .aack, .breq(m2_ack), .b(W'(2)), .back,
    .creq, .c(amux_c), .cack);

  tog_reg #(.W(W)) u_reg_w (.clk, .clr_n, .req(creq), .ack(cack), .d(amux_c), .q(w_q));

  tog_xor #(.N(2)) u_xor (.in({aack, back}), .out(lt_req));

  tog_test #(.W(W), .OP(TEST_LT)) u_lt (
    .clk, .clr_n, .a(twicea), .b(w_q), .req(lt_req), .t(lt_t), .f(lt_f));

  tog_fab #(.W(W), .OP(FAB_TIMES4)) u_fab_times4 (
    .clk, .clr_n, .a(w_q), .b('0), .req(lt_f), .y(t4_y), .ack(t4_ack));

  tog_fab #(.W(W), .OP(FAB_DIV2)) u_fab_div2 (
    .clk, .clr_n, .a(w_q), .b('0), .req(lt_t), .y(v0), .ack(initv_out));

  tog_fab #(.W(W), .OP(FAB_NEG)) u_fab_neg (
    .clk, .clr_n, .a(a_q), .b('0), .req(initv_in), .y(u0), .ack(go_out));

  assign initv_data = signed'(v0);
  assign go_w       = w_q;
  assign go_u       = signed'(u0);
endmodule
