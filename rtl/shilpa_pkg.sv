// shilpa_pkg -- widths shared by the self-timed circuits in this library.
//
// Every circuit here uses two-phase (transition) signalling with bundled
// data: a request is a toggle of a req wire, the answer is a toggle of the
// matching ack wire, and a channel is idle when req == ack. The data bundled
// with a request is stable from the request toggle until the acknowledge.
//
// The factorial datapath is 8 bits wide (the reg8 registers and [7:0] buses
// of its netlist); the square-root datapath is 16 bits wide (its [15:0]
// buses). The accumulator width of the factorial is this library's choice.
package shilpa_pkg;
  localparam int unsigned FACT_W     = 8;   // n, the factorial argument
  localparam int unsigned FACT_ACC_W = 32;  // a, the accumulated product (own choice)
  localparam int unsigned SQRT_W     = 16;  // a, w, v, t, u of the square root

  // Operations of the generic function action block (tog_fab); a, b are
  // W-bit two's complement operands, results are taken modulo 2**W.
  typedef enum logic [2:0] {
    FAB_MULT2,    // 2a
    FAB_TIMES4,   // 4a
    FAB_DIV2,     // a/2   (arithmetic shift)
    FAB_DIV4,     // a/4   (logical shift; used on w >= 0)
    FAB_NEG,      // -a
    FAB_PLUS      // a + b
  } fab_op_e;

  // Predicates of the generic two-way test (tog_test).
  typedef enum logic [1:0] {
    TEST_LT,      // a < b, unsigned
    TEST_LE2,     // a <= 2, unsigned
    TEST_GT0      // a > 0, signed
  } test_op_e;

  // A two-phase channel has a request pending when req and ack differ.
  function automatic logic pending(input logic req, input logic ack);
    return req ^ ack;
  endfunction
endpackage
