// reg_cell: the generic building block of an RTL datapath, one register with
// a next-value multiplexer in front of it.
//
// Every clock edge the register loads one of NFUNC+1 candidates: its own
// current value (hold), or the output of one of NFUNC combinational
// arithmetic/logic functions computed outside this cell from other
// registers. The controller picks the candidate with `sel`.
//
// Interface
//   sel == 0          : hold, q keeps its value
//   sel == k, 1..NFUNC: q <= func_in[k-1]
//   sel  > NFUNC      : treated as hold
// Timing: q changes only on the rising edge of clk; the choice made during a
// clock period takes effect at the end of that period. There is no reset;
// the register holds an undefined value until it is first loaded.
//
// The structure (functions, a multiplexer that also takes the register's own
// output, one register clocked by the common clock) is the generic datapath
// component of the original design. Which mux input is number 0 and what
// happens on unused select codes are this design's choices.
module reg_cell #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned NFUNC = 2,
  localparam int unsigned SELW = $clog2(NFUNC + 1)
) (
  input  logic                   clk,
  input  logic [SELW-1:0]        sel,
  input  logic [WIDTH-1:0]       func_in [NFUNC],
  output logic [WIDTH-1:0]       q
);

  logic [WIDTH-1:0] d;

  always_comb begin
    d = q;
    for (int unsigned k = 0; k < NFUNC; k++) begin
      if (sel == SELW'(k + 1)) d = func_in[k];
    end
  end

  always_ff @(posedge clk) begin
    q <= d;
  end

endmodule
