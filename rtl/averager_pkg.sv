// averager_pkg: types and constants shared by the four-input summer.
//
// The summer adds four unsigned numbers with a single adder, one number per
// clock, under control of a small state machine. This package holds what the
// datapath and the controller must agree on:
//   * NUM_W / num_t : the width and type of the numbers (8-bit unsigned, as in
//     the original design; sums wrap modulo 2**NUM_W).
//   * state_t       : the controller's six states, clr, add_a .. add_d, hold.
//     The state names and their order follow the original design; the 3-bit
//     binary encoding in that order is this design's choice.
//   * sel_t / SEL_* : the 2-bit code that picks which input the datapath adds.
package averager_pkg;

  localparam int unsigned NUM_W = 8;

  typedef logic [NUM_W-1:0] num_t;

  typedef enum logic [2:0] {
    S_CLR   = 3'd0,
    S_ADD_A = 3'd1,
    S_ADD_B = 3'd2,
    S_ADD_C = 3'd3,
    S_ADD_D = 3'd4,
    S_HOLD  = 3'd5
  } state_t;

  typedef logic [1:0] sel_t;

  localparam sel_t SEL_A = 2'b00;
  localparam sel_t SEL_B = 2'b01;
  localparam sel_t SEL_C = 2'b10;
  localparam sel_t SEL_D = 2'b11;

endpackage
