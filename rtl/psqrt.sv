// psqrt -- pipelined integer square-root circuit.
//
// Computes floor(sqrt(a)) with shifts, additions and comparisons only (no
// multiplier), by the strength-reduced loop
//   w = 2; while (2a >= w) w = 4w;  u = -a; v = w/2;
//   while (w > 2) { w = w/4; v = (v-w)/2; t = u+v; if (t <= 0) { u = t; v = v+w; } }
//   z = (v-1)/2;
// split into three communicating processes:
//   sqrt_getw       -- reads a, finds the starting w, initialises v and u;
//   sqrt_after_getw -- runs the loop on w, t and u;
//   sqrt_pv         -- owns v, updates it on request and emits z.
// Because v is kept in its own process, the loop process does not wait for
// v + w: it goes on to the next w/4 and test while pv adds.
//
// Interface: get_number (get_req, get_data, answered on get_ack) takes a;
// final_answer (final_req, final_data, answered on final_ack) returns z.
// Both are two-phase with bundled data. a must be below 2**(W-4).
module psqrt #(
  parameter int unsigned W = shilpa_pkg::SQRT_W
) (
  input  logic                clk,
  input  logic                clr_n,
  input  logic                get_req,
  input  logic [W-1:0]        get_data,
  output logic                get_ack,
  output logic                final_req,
  output logic signed [W-1:0] final_data,
  input  logic                final_ack
);
  logic                initv_req, initv_ack, go_req, go_ack;
  logic signed [W-1:0] initv_data, go_u, vportack_data;
  logic [W-1:0]        go_w, d2_data, addw_data;
  logic                d2_req, d2_ack, vport_req, vport_ack;
  logic                vportack_req, vportack_ack, addw_req, addw_ack, sfa_req, sfa_ack;

  sqrt_getw #(.W(W)) u_getw (
    .clk, .clr_n, .get_req, .get_data, .get_ack,
    .initv_out(initv_req), .initv_data, .initv_in(initv_ack),
    .go_out(go_req), .go_w, .go_u, .go_in(go_ack));

  sqrt_after_getw #(.W(W)) u_loop (
    .clk, .clr_n, .go_req, .go_w, .go_u, .go_ack,
    .div2minusvw_out(d2_req), .div2minusvw_data(d2_data), .div2minusvw_in(d2_ack),
    .vport_out(vport_req), .vport_in(vport_ack),
    .vportack_req, .vportack_data, .vportack_ack,
    .addw_out(addw_req), .addw_data, .addw_in(addw_ack),
    .sfa_out(sfa_req), .sfa_in(sfa_ack));

  sqrt_pv #(.W(W)) u_pv (
    .clk, .clr_n,
    .div2minusvw_req(d2_req), .div2minusvw_data(d2_data), .div2minusvw_ack(d2_ack),
    .vport_req, .vport_ack, .vportack_req, .vportack_data, .vportack_ack,
    .addw_req, .addw_data, .addw_ack, .sfa_req, .sfa_ack,
    .final_req, .final_data, .final_ack,
    .initv_req, .initv_data, .initv_ack);
endmodule
