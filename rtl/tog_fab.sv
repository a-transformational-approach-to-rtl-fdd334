// tog_fab -- function action block (FAB) with one fixed operation.
//
// A toggle on req computes y = OP(a, b) into an output register and toggles
// ack in the same clock edge, so y is valid when ack toggles (bundled data).
// The operand inputs must be stable from req until ack. OP selects one of
// the shift, negate and add operations the square-root processes need (see
// shilpa_pkg::fab_op_e); unary operations ignore b. clr_n is the active-low
// clear.
module tog_fab #(
  parameter int unsigned         W  = 16,
  parameter shilpa_pkg::fab_op_e OP = shilpa_pkg::FAB_PLUS
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         req,
  output logic [W-1:0] y,
  output logic         ack
);
  logic [W-1:0] f;

  always_comb begin
    unique case (OP)
      shilpa_pkg::FAB_MULT2:  f = a << 1;
      shilpa_pkg::FAB_TIMES4: f = a << 2;
      shilpa_pkg::FAB_DIV2:   f = W'($signed(a) >>> 1);
      shilpa_pkg::FAB_DIV4:   f = a >> 2;
      shilpa_pkg::FAB_NEG:    f = -a;
      default:                f = a + b;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!clr_n) begin
      y   <= '0;
      ack <= 1'b0;
    end else if (req != ack) begin
      y   <= f;
      ack <= req;
    end
  end
endmodule
