// fact_system -- the pipelined factorial circuit, factpipe || pa.
//
// factpipe walks n down to 0, sending each nonzero n to pa over channel mult
// and then senda when n reaches 0; pa multiplies each n into its accumulator
// while factpipe already decrements, and on senda offers n! on the result
// channel. factpipe then waits for the next argument on channel again.
//
// Start-up: after clear, n = 0 and a = 1, and a toggle on start makes the
// circuit deliver 0! = 1 on result and then wait on again. Every further
// request on again (again_req, again_data, answered on again_ack) yields
// again_data! on result (result_req, result_data, answered on result_ack),
// modulo 2**ACC_W. mul_busy is high while pa's multiplier works. All
// channels are two-phase with bundled data; clr_n is the active-low clear.
//
// PIPELINED = 0 builds the unpipelined version (fact waits on rslt before it
// decrements; see fact_pa) from the same elements, as a baseline: per
// nonzero step it is slower by the part of the multiply that the pipelined
// version hides behind the decrement.
module fact_system #(
  parameter int unsigned W         = shilpa_pkg::FACT_W,
  parameter int unsigned ACC_W     = shilpa_pkg::FACT_ACC_W,
  parameter int unsigned MUL_LAT   = 1,
  parameter bit          PIPELINED = 1'b1
) (
  input  logic             clk,
  input  logic             clr_n,
  input  logic             start,
  input  logic             again_req,
  input  logic [W-1:0]     again_data,
  output logic             again_ack,
  output logic             result_req,
  output logic [ACC_W-1:0] result_data,
  input  logic             result_ack,
  output logic             mul_busy
);
  logic         mult_req, mult_ack, senda_req, senda_ack;
  logic [W-1:0] mult_data;

  factpipe #(.W(W)) u_factpipe (
    .clk, .CLR(clr_n), .START(start),
    .SENDA_OUT(senda_req), .SENDA_IN(senda_ack),
    .AGAIN_IN(again_req), .AGAIN_DATA(again_data), .AGAIN_OUT(again_ack),
    .MULT_OUT(mult_req), .MULT_IN(mult_ack), .MULT_DATA(mult_data));

  fact_pa #(.W(W), .ACC_W(ACC_W), .MUL_LAT(MUL_LAT), .PIPELINED(PIPELINED)) u_pa (
    .clk, .clr_n, .mult_req, .mult_data, .mult_ack, .senda_req, .senda_ack,
    .result_req, .result_data, .result_ack, .mul_busy);
endmodule
