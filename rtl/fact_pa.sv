// fact_pa -- accumulator process of the pipelined factorial.
//
//   pa[a] <= mult?n  -> pa[n*a]
//          | senda?  -> result!a -> pa[1]
//
// pa owns the accumulating parameter a (initially 1). On mult?n it latches n
// and acknowledges at once, then multiplies in the background, so the driver
// can decrement n while the product is formed: this is the software
// pipelining. A new request is served only after the product is in a. On
// senda? it acknowledges, offers a on the result channel, and sets a back to
// 1 once result is acknowledged.
//
// Channels are two-phase: mult (mult_req, mult_data, mult_ack), senda
// (senda_req, senda_ack), result (result_req, result_data, result_ack). The
// multiplier is a function action block whose completion comes MUL_LAT
// clocks after it starts; its structure, the latency and the width ACC_W of a
// (the product is kept modulo 2**ACC_W) are this design's choices.
//
// PIPELINED = 0 gives the unpipelined form of the same pair of processes,
//   fact[n,a] <= (not (n=0)) -> mult!(n,a) -> rslt?w -> fact[n-1,w] | ...
//   pa[]      <= mult?(x,y) -> rslt!(x*y) -> pa[]
// in which the driver waits for the product before it goes on. Here it is
// made by returning the mult acknowledge only when the product is in a, so
// the driver's decrement, which is started by that acknowledge, waits for
// the multiplication. a stays inside pa instead of travelling to the driver
// and back; the order of events is the same. It serves as the baseline
// against which the pipelining is measured.
module fact_pa #(
  parameter int unsigned W         = shilpa_pkg::FACT_W,
  parameter int unsigned ACC_W     = shilpa_pkg::FACT_ACC_W,
  parameter int unsigned MUL_LAT   = 1,
  parameter bit          PIPELINED = 1'b1
) (
  input  logic             clk,
  input  logic             clr_n,
  input  logic             mult_req,
  input  logic [W-1:0]     mult_data,
  output logic             mult_ack,
  input  logic             senda_req,
  output logic             senda_ack,
  output logic             result_req,
  output logic [ACC_W-1:0] result_data,
  input  logic             result_ack,
  output logic             mul_busy
);
  typedef enum logic [1:0] {IDLE, MUL, RES} state_e;
  state_e           state;
  logic [ACC_W-1:0] a;
  logic [W-1:0]     n;
  logic [7:0]       cnt;

  assign mul_busy = (state == MUL);

  always_ff @(posedge clk) begin
    if (!clr_n) begin
      state <= IDLE;
      a     <= ACC_W'(1);
      n     <= '0;
      cnt   <= '0;
      {mult_ack, senda_ack, result_req} <= '0;
      result_data <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          if (shilpa_pkg::pending(mult_req, mult_ack)) begin
            n        <= mult_data;
            if (PIPELINED) mult_ack <= mult_req;
            cnt      <= 8'(MUL_LAT - 1);
            state    <= MUL;
          end else if (shilpa_pkg::pending(senda_req, senda_ack)) begin
            senda_ack   <= senda_req;
            result_data <= a;
            result_req  <= ~result_req;
            state       <= RES;
          end
        end
        MUL: begin
          if (cnt == 0) begin
            a     <= a * ACC_W'(n);
            if (!PIPELINED) mult_ack <= mult_req;
            state <= IDLE;
          end else begin
            cnt <= cnt - 8'd1;
          end
        end
        RES: begin
          if (result_ack == result_req) begin
            a     <= ACC_W'(1);
            state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end


  // A sender must not withdraw or repeat a request before it is answered.
  a_mult: assert property (@(posedge clk) disable iff (!clr_n)
    (mult_req != mult_ack) |=> (mult_req != mult_ack) || (mult_ack != $past(mult_ack)));
  a_senda: assert property (@(posedge clk) disable iff (!clr_n)
    (senda_req != senda_ack) |=> (senda_req != senda_ack) || (senda_ack != $past(senda_ack)));
endmodule
