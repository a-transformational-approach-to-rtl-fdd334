// factpipe -- driver process of the pipelined factorial.
//
//   factpipe[n] <= (n=0)     -> senda! -> again?n -> factpipe[n]
//                | (not n=0) -> mult!n -> factpipe[n-1]
//
// The netlist is the one of the synthesized circuit: a three-input XOR merge,
// a ZERO test, a C-element, a decrementer, two registers and an asynchronous
// multiplexer (AMUX). Operation:
//   * A toggle on START (or a tail call) reaches ZERO through the XOR, and
//     ZERO tests the register n.
//   * T (n = 0) is SENDA_OUT, the request of senda!. The C-element waits for
//     its acknowledge SENDA_IN and for the request AGAIN_IN of again?n, then
//     loads AGAIN_DATA through input B of the AMUX into register n. The AMUX
//     acknowledge BACK is AGAIN_OUT (the acknowledge of again?n) and also
//     re-enters the XOR: tail call factpipe[n].
//   * F (n /= 0) is MULT_OUT, the request of mult!n; MULT_DATA is register n.
//     Its acknowledge MULT_IN triggers decr, whose ack loads the result
//     register with n-1; that register's ack routes n-1 through AMUX input A
//     into register n, and AACK re-enters the XOR: tail call factpipe[n-1].
// In the synthesis resource list these are XOR_13, PAB_8 (zero test),
// C_10 (data query for again?n), FAB_5 (decr), REG_7 (result of FAB_5),
// AMUX_12 and REG_3 (n); the argument registers of the zero test and of decr
// have been removed, as in the published circuit.
// All channels are two-phase with bundled data. CLR is the active-low clear
// of every element. The port names are those of the netlist. The
// choice of BACK as AGAIN_OUT and the one-clock delay of each element are
// this model's own reading.
module factpipe #(
  parameter int unsigned W = shilpa_pkg::FACT_W
) (
  input  logic         clk,
  input  logic         CLR,
  input  logic         START,
  output logic         SENDA_OUT,
  input  logic         SENDA_IN,
  input  logic         AGAIN_IN,
  input  logic [W-1:0] AGAIN_DATA,
  output logic         AGAIN_OUT,
  output logic         MULT_OUT,
  input  logic         MULT_IN,
  output logic [W-1:0] MULT_DATA
);
  logic         zero_req, c_out;
  logic         aack, back, creq, cack;
  logic         decr_ack, rslt_ack;
  logic [W-1:0] decr_y, rslt_q, amux_c, n_q;

  tog_xor #(.N(3)) u_xor3 (.in({back, aack, START}), .out(zero_req));

  tog_zero #(.W(W)) u_zero (.clk, .clr_n(CLR), .a(n_q), .req(zero_req),
                            .t(SENDA_OUT), .f(MULT_OUT));

  tog_celem u_c (.clk, .mc_n(CLR), .a(SENDA_IN), .b(AGAIN_IN), .out(c_out));

  tog_decr #(.W(W)) u_decr (.clk, .clr_n(CLR), .a(n_q), .req(MULT_IN),
                            .y(decr_y), .ack(decr_ack));

  // result register of n (loaded with n-1)
  tog_reg #(.W(W)) u_rslt (.clk, .clr_n(CLR), .req(decr_ack), .ack(rslt_ack),
                           .d(decr_y), .q(rslt_q));

  tog_amux #(.W(W)) u_amux (.clk, .clr_n(CLR),
                            .areq(rslt_ack), .a(rslt_q),     .aack,
                            .breq(c_out),    .b(AGAIN_DATA), .back,
                            .creq, .c(amux_c), .cack);

  // register n
  tog_reg #(.W(W)) u_n (.clk, .clr_n(CLR), .req(creq), .ack(cack),
                        .d(amux_c), .q(n_q));

  assign MULT_DATA = n_q;
  assign AGAIN_OUT = back;
endmodule
