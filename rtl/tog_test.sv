// tog_test -- two-way test with a transition answer (LT, le2, gt0).
//
// A toggle on req evaluates the predicate OP on a (and b); one clock later
// t toggles if it holds and f toggles if not, steering control into one
// branch of a guarded choice. Operands must be stable from req until the
// answer. Predicates: a < b (unsigned), a <= 2 (unsigned), a > 0 (signed),
// see shilpa_pkg::test_op_e. clr_n is the active-low clear.
module tog_test #(
  parameter int unsigned          W  = 16,
  parameter shilpa_pkg::test_op_e OP = shilpa_pkg::TEST_LT
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         req,
  output logic         t,
  output logic         f
);
  logic seen;   // phase of the last request answered
  logic holds;

  always_comb begin
    unique case (OP)
      shilpa_pkg::TEST_LT:  holds = a < b;
      shilpa_pkg::TEST_LE2: holds = a <= W'(2);
      default:              holds = $signed(a) > 0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!clr_n) begin
      {seen, t, f} <= '0;
    end else if (req != seen) begin
      seen <= req;
      if (holds) t <= ~t;
      else       f <= ~f;
    end
  end
endmodule
