// shilpa_top -- the self-timed circuits of this library side by side.
//
// Three independent circuits share only the clock and the active-low clear:
//   * fact_*  -- the pipelined factorial (factpipe || pa): again -> result;
//   * sqrt_*  -- the pipelined integer square root: get_number -> final_answer;
//   * ex_*    -- the refined process S[x] <= p?y -> S[f(x,y)], with its input
//               channel p shared by EX_N receivers and its function block
//               FAB_f outside.
// All channels are two-phase (transition) handshakes with bundled data: a
// request is a toggle of *_req (or *_ctl), answered by a toggle of *_ack
// (or *_done). Circuits are modelled synchronously, every state-holding
// element updating on the rising edge of clk.
module shilpa_top #(
  parameter int unsigned FACT_W    = shilpa_pkg::FACT_W,
  parameter int unsigned ACC_W     = shilpa_pkg::FACT_ACC_W,
  parameter int unsigned MUL_LAT   = 1,
  parameter int unsigned SQRT_W    = shilpa_pkg::SQRT_W,
  parameter int unsigned EX_W      = 8,
  parameter int unsigned EX_N      = 2
) (
  input  logic                     clk,
  input  logic                     clr_n,
  // factorial
  input  logic                     fact_start,
  input  logic                     fact_again_req,
  input  logic [FACT_W-1:0]        fact_again_data,
  output logic                     fact_again_ack,
  output logic                     fact_result_req,
  output logic [ACC_W-1:0]         fact_result_data,
  input  logic                     fact_result_ack,
  output logic                     fact_mul_busy,
  // square root
  input  logic                     sqrt_get_req,
  input  logic [SQRT_W-1:0]        sqrt_get_data,
  output logic                     sqrt_get_ack,
  output logic                     sqrt_final_req,
  output logic signed [SQRT_W-1:0] sqrt_final_data,
  input  logic                     sqrt_final_ack,
  // action-refinement example
  input  logic                     ex_start,
  input  logic                     ex_p_ctl,
  input  logic [EX_W-1:0]          ex_p_data,
  output logic                     ex_p_done,
  input  logic [EX_N-2:0]          ex_rx_rdy,
  output logic [EX_N-2:0]          ex_rx_ack,
  output logic [EX_W-1:0]          ex_rx_y [EX_N-1],
  output logic [EX_W-1:0]          ex_x,
  output logic                     ex_fab_init,
  input  logic                     ex_fab_done,
  output logic [EX_W-1:0]          ex_fab_a,
  output logic [EX_W-1:0]          ex_fab_b,
  input  logic [EX_W-1:0]          ex_fab_r
);
  fact_system #(.W(FACT_W), .ACC_W(ACC_W), .MUL_LAT(MUL_LAT)) u_fact (
    .clk, .clr_n, .start(fact_start),
    .again_req(fact_again_req), .again_data(fact_again_data), .again_ack(fact_again_ack),
    .result_req(fact_result_req), .result_data(fact_result_data), .result_ack(fact_result_ack),
    .mul_busy(fact_mul_busy));

  psqrt #(.W(SQRT_W)) u_sqrt (
    .clk, .clr_n, .get_req(sqrt_get_req), .get_data(sqrt_get_data), .get_ack(sqrt_get_ack),
    .final_req(sqrt_final_req), .final_data(sqrt_final_data), .final_ack(sqrt_final_ack));

  refine_example #(.W(EX_W), .N(EX_N), .BROADCAST(1'b0)) u_ex (
    .clk, .clr_n, .start(ex_start),
    .p_ctl(ex_p_ctl), .p_data(ex_p_data), .p_done(ex_p_done),
    .rx_rdy(ex_rx_rdy), .rx_ack(ex_rx_ack), .rx_y(ex_rx_y),
    .x(ex_x), .fab_init(ex_fab_init), .fab_done(ex_fab_done),
    .fab_a(ex_fab_a), .fab_b(ex_fab_b), .fab_r(ex_fab_r));
endmodule
