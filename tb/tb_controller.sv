// tb_controller: self-checking test of the summer's state machine.
//
// The testbench keeps its own model of the sequence as a step counter
// (0 = idle, 1 = clear, 2..5 = add a..d) and checks sel, load and clear
// after every rising edge against the table of the state machine. It then
// checks directed cases: update held low keeps the machine idle, a one-cycle
// update starts exactly one computation that ends five edges later, update
// during a computation is ignored, and update held high restarts a new
// computation right after the old one, every six clocks.
module tb_controller;
  import averager_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic update, rst, load, clear;
  sel_t sel;

  controller dut (.update(update), .sel(sel), .load(load), .clear(clear),
                  .clk(clk), .rst(rst));

  int step_m;          // reference: 0 idle, 1 clear, 2..5 add a..d
  int n_start = 0, n_ignored = 0, n_idle = 0;

  function automatic void expect_outputs();
    sel_t e_sel;
    logic e_load, e_clear;
    e_sel   = (step_m >= 2 && step_m <= 4) ? sel_t'(step_m - 2) : 2'b11;
    e_load  = (step_m >= 2);
    e_clear = (step_m == 1);
    checks++;
    if (sel !== e_sel || load !== e_load || clear !== e_clear) begin
      failures++;
      $display("t=%0t step=%0d sel=%b load=%b clear=%b expected %b %b %b",
               $time, step_m, sel, load, clear, e_sel, e_load, e_clear);
    end
  endfunction

  // drive update for one clock and advance the reference model
  task automatic cycle(input logic upd);
    @(negedge clk);
    update = upd;
    if (step_m == 0) begin
      if (upd) begin step_m = 1; n_start++; end
      else n_idle++;
    end else begin
      if (upd) n_ignored++;
      step_m = (step_m == 5) ? 0 : step_m + 1;
    end
    @(posedge clk); #1;
    expect_outputs();
  endtask

  initial begin
    #200000;
    failures++;
    $display("tb_controller: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_start, done;
    update = 1'b0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    step_m = 0;
    expect_outputs();
    @(negedge clk);
    rst = 1'b0;

    // idle stays idle
    repeat (4) cycle(1'b0);

    // one pulse: clear then four loads, back to idle after five edges
    cycle(1'b1);
    t_start = 0;
    done = 0;
    for (int i = 1; i <= 8; i++) begin
      cycle(1'b0);
      if (!done && !load && !clear) begin
        done = 1;
        checks++;
        if (i != 5) begin
          failures++;
          $display("computation took %0d edges after clear, expected 5", i);
        end
      end
    end

    // update held high: a new computation every six clocks
    repeat (18) cycle(1'b1);
    cycle(1'b0);
    repeat (6) cycle(1'b0);

    // random update stream
    repeat (400) cycle(1'($urandom_range(0, 2) == 0));

    // reset in the middle of a computation returns to idle
    cycle(1'b1);
    cycle(1'b0);
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk); #1;
    step_m = 0;
    expect_outputs();
    @(negedge clk);
    rst = 1'b0;
    cycle(1'b0);

    checks++;
    if (n_start < 3 || n_ignored == 0 || n_idle == 0) begin
      failures++;
      $display("coverage: starts=%0d ignored=%0d idle=%0d", n_start, n_ignored, n_idle);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
