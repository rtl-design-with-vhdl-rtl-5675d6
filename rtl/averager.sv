// averager: four-input summer built as a datapath and a controller.
//
// It computes sum = a + b + c + d (modulo 2**WIDTH) with one adder and one
// register, instead of three adders in a combinational tree. When `update`
// is sampled high while idle, the controller clears the sum register and
// then adds a, b, c and d to it, one per clock. `sum` shows the running
// value: 0, a, a+b, a+b+c and finally a+b+c+d, which it keeps until the next
// update. The inputs must be stable from the clock after update is sampled
// until the corresponding add state ends.
//
// Timing: update sampled at edge E -> clr during the next clock; sum = 0
// after E+1, a after E+2, a+b after E+3, a+b+c after E+4, a+b+c+d after E+5.
// A new update is accepted from edge E+6 on.
//
// Ports follow the original top level (a, b, c, d, sum, update, clk); rst,
// a synchronous active-high reset of the controller, is this design's
// addition. The sum register itself is not reset.
module averager
  import averager_pkg::*;
#(
  parameter int unsigned WIDTH = NUM_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] sum,
  input  logic             update,
  input  logic             clk,
  input  logic             rst
);

  sel_t sel;
  logic load;
  logic clear;

  datapath #(
    .WIDTH (WIDTH)
  ) d1 (
    .a     (a),
    .b     (b),
    .c     (c),
    .d     (d),
    .sum   (sum),
    .sel   (sel),
    .load  (load),
    .clear (clear),
    .clk   (clk)
  );

  controller c1 (
    .update (update),
    .sel    (sel),
    .load   (load),
    .clear  (clear),
    .clk    (clk),
    .rst    (rst)
  );

endmodule
