// datapath: one-adder accumulator datapath of the four-input summer.
//
// An input multiplexer picks one of the numbers a, b, c, d according to
// `sel` (00 -> a, 01 -> b, 10 -> c, 11 -> d). A single WIDTH-bit adder adds
// that number to the sum register. The register is built from the generic
// reg_cell, whose next-value multiplexer chooses among:
//   load  = 1             : sum_reg + selected input  (load has priority)
//   load  = 0, clear = 1  : zero
//   both 0                : sum_reg (hold)
// The addition wraps modulo 2**WIDTH; there is no carry out.
//
// Timing: `sum` is the register output, so it changes only on the rising
// edge of clk, one clock after the controls that caused the change. The sum
// register has no reset; it is undefined until the first clear.
//
// The input mux, single adder, zero/hold/sum register mux, the select coding
// and the load-over-clear priority follow the original design. Building the
// register from the generic reg_cell is this design's choice.
module datapath
  import averager_pkg::*;
#(
  parameter int unsigned WIDTH = NUM_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] sum,
  input  sel_t             sel,
  input  logic             load,
  input  logic             clear,
  input  logic             clk
);

  logic [WIDTH-1:0] mux_out;
  logic [WIDTH-1:0] sum_reg;
  logic [WIDTH-1:0] cand [2];
  logic [1:0]       cell_sel;

  // input multiplexer
  always_comb begin
    unique case (sel)
      SEL_A:   mux_out = a;
      SEL_B:   mux_out = b;
      SEL_C:   mux_out = c;
      SEL_D:   mux_out = d;
    endcase
  end

  // candidates for the register: adder output and zero
  assign cand[0] = sum_reg + mux_out;
  assign cand[1] = '0;

  // load wins over clear; neither holds
  always_comb begin
    if (load)       cell_sel = 2'd1;
    else if (clear) cell_sel = 2'd2;
    else            cell_sel = 2'd0;
  end

  reg_cell #(
    .WIDTH (WIDTH),
    .NFUNC (2)
  ) u_sum_reg (
    .clk     (clk),
    .sel     (cell_sel),
    .func_in (cand),
    .q       (sum_reg)
  );

  assign sum = sum_reg;

endmodule
