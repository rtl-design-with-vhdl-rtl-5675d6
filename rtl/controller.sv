// controller: state machine that sequences the four-input summer.
//
// It waits in state hold until `update` is sampled high, then steps through
// clr, add_a, add_b, add_c, add_d, one state per clock, and returns to hold.
// `update` is looked at only in hold; while a computation runs it is ignored,
// and if it is still high on return to hold a new computation starts at once.
// The outputs are decoded from the state alone (Moore):
//   state   sel  load clear
//   clr     11    0    1
//   add_a   00    1    0
//   add_b   01    1    0
//   add_c   10    1    0
//   add_d   11    1    0
//   hold    11    0    0
// An unused state encoding behaves like hold. So from update in hold to the
// finished sum in the datapath register takes five more clock edges, and a
// new update is accepted six clocks after the previous one.
//
// Interface: update (in), sel/load/clear (out, to the datapath), clk, rst.
// rst is synchronous and active high and puts the machine in hold.
//
// States, transitions and output decoding follow the original design. The
// state encoding and the reset input are this design's choices; without rst
// the machine still reaches hold within five clocks from any state.
module controller
  import averager_pkg::*;
(
  input  logic update,
  output sel_t sel,
  output logic load,
  output logic clear,
  input  logic clk,
  input  logic rst
);

  state_t s, ns;

  always_comb begin
    unique case (s)
      S_CLR:   ns = S_ADD_A;
      S_ADD_A: ns = S_ADD_B;
      S_ADD_B: ns = S_ADD_C;
      S_ADD_C: ns = S_ADD_D;
      S_ADD_D: ns = S_HOLD;
      default: ns = update ? S_CLR : S_HOLD;   // hold and unused codes
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) s <= S_HOLD;
    else     s <= ns;
  end

  always_comb begin
    unique case (s)
      S_ADD_A: sel = SEL_A;
      S_ADD_B: sel = SEL_B;
      S_ADD_C: sel = SEL_C;
      default: sel = SEL_D;
    endcase
  end

  assign load  = !(s == S_CLR || s == S_HOLD);
  assign clear = (s == S_CLR);

  // the datapath gives load priority, so the two are never asked for together
  a_load_clear_exclusive : assert property (@(posedge clk) !(load && clear))
    else $error("controller: load and clear asserted together");

endmodule
