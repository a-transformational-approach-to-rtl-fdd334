// sqrt_pv -- process owning v in the pipelined integer square root.
//
//   pv[v] <= div2minusvw?w1     -> pv[(v - w1)/2]
//          | vport?             -> vportack!v -> pv[v]
//          | addw?w1            -> pv[v + w1]
//          | send_final_answer? -> final_answer!((v-1)/2) -> pv[v]
//          | initv?v            -> pv[v]
//
// A guarded choice over five input channels. Each request is acknowledged as
// soon as its data is taken, and the update of v completes in the same clock,
// so the sender runs on while pv works. vport is answered by an output
// on vportack carrying v; send_final_answer by an output on final_answer
// carrying (v-1)/2. Division by 2 is an arithmetic right shift (v stays
// positive, where it equals C's truncating division). If several requests
// were pending at once they would be served in the order listed above; the
// processes around pv never make more than one pending.
// All channels are two-phase with bundled data; W-bit two's complement.
module sqrt_pv #(
  parameter int unsigned W = shilpa_pkg::SQRT_W
) (
  input  logic                clk,
  input  logic                clr_n,
  input  logic                div2minusvw_req,
  input  logic [W-1:0]        div2minusvw_data,
  output logic                div2minusvw_ack,
  input  logic                vport_req,
  output logic                vport_ack,
  output logic                vportack_req,
  output logic signed [W-1:0] vportack_data,
  input  logic                vportack_ack,
  input  logic                addw_req,
  input  logic [W-1:0]        addw_data,
  output logic                addw_ack,
  input  logic                sfa_req,
  output logic                sfa_ack,
  output logic                final_req,
  output logic signed [W-1:0] final_data,
  input  logic                final_ack,
  input  logic                initv_req,
  input  logic signed [W-1:0] initv_data,
  output logic                initv_ack
);
  typedef enum logic [1:0] {IDLE, VPA, FIN} state_e;
  state_e              state;
  logic signed [W-1:0] v;

  always_ff @(posedge clk) begin
    if (!clr_n) begin
      state <= IDLE;
      v <= '0;
      vportack_data <= '0;
      final_data    <= '0;
      {div2minusvw_ack, vport_ack, vportack_req, addw_ack, sfa_ack, final_req, initv_ack} <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          if (shilpa_pkg::pending(div2minusvw_req, div2minusvw_ack)) begin
            div2minusvw_ack <= div2minusvw_req;
            v <= (v - signed'(div2minusvw_data)) >>> 1;
          end else if (shilpa_pkg::pending(vport_req, vport_ack)) begin
            vport_ack     <= vport_req;
            vportack_data <= v;
            vportack_req  <= ~vportack_req;
            state         <= VPA;
          end else if (shilpa_pkg::pending(addw_req, addw_ack)) begin
            addw_ack <= addw_req;
            v <= v + signed'(addw_data);
          end else if (shilpa_pkg::pending(sfa_req, sfa_ack)) begin
            sfa_ack    <= sfa_req;
            final_data <= (v - signed'(W'(1))) >>> 1;
            final_req  <= ~final_req;
            state      <= FIN;
          end else if (shilpa_pkg::pending(initv_req, initv_ack)) begin
            initv_ack <= initv_req;
            v <= initv_data;
          end
        end
        VPA: if (vportack_ack == vportack_req) state <= IDLE;
        FIN: if (final_ack == final_req) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
