// ctree -- completion tree over N transition inputs (Ctree).
//
// The output transitions once every input has transitioned, so it tells a
// sender that all N receivers have latched its value. It is built as a
// binary tree of two-input C-elements; an odd node is carried to the next
// level unchanged. The latency is ceil(log2 N) clocks (0 for N = 1).
module ctree #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         clr_n,
  input  logic [N-1:0] in,
  output logic         out
);
  localparam int unsigned LEVELS = (N <= 1) ? 0 : $clog2(N);

  // node[l][k]: node k of level l; level 0 is the inputs.
  logic [N-1:0] node [LEVELS+1];

  assign node[0] = in;

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned CNT  = (N + (1 << l) - 1) >> l;   // nodes at level l
    localparam int unsigned NEXT = (CNT + 1) / 2;
    for (genvar k = 0; k < N; k++) begin : g_node
      if (k < CNT / 2) begin : g_join
        tog_celem u_c (.clk, .mc_n(clr_n), .a(node[l][2*k]), .b(node[l][2*k+1]),
                       .out(node[l+1][k]));
      end else if (k == CNT / 2 && (CNT % 2) == 1) begin : g_pass
        // odd node: delayed one clock so every path has the same depth
        tog_celem u_c (.clk, .mc_n(clr_n), .a(node[l][2*k]), .b(node[l][2*k]),
                       .out(node[l+1][k]));
      end else if (k >= NEXT) begin : g_unused
        assign node[l+1][k] = 1'b0;
      end
    end
  end

  assign out = node[LEVELS][0];
endmodule
