// tb_datapath: self-checking test of the summer's datapath.
//
// The controls sel, load and clear are driven at random (including load and
// clear together, where load must win), with random inputs a..d. After every
// rising edge, sum is compared with a reference accumulator kept in the
// testbench. A directed sequence then replays one full computation
// (clear, add a, add b, add c, add d) including a case that wraps past 255.
module tb_datapath;
  import averager_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  num_t a, b, c, d, sum;
  sel_t sel;
  logic load, clear;

  datapath dut (.a(a), .b(b), .c(c), .d(d), .sum(sum),
                .sel(sel), .load(load), .clear(clear), .clk(clk));

  num_t model;
  int n_load = 0, n_clear = 0, n_hold = 0, n_both = 0;

  task automatic step(input sel_t s, input logic ld, input logic cl);
    num_t pick;
    @(negedge clk);
    sel = s; load = ld; clear = cl;
    pick = (s == 2'b00) ? a : (s == 2'b01) ? b : (s == 2'b10) ? c : d;
    if (ld) begin
      model = num_t'(model + pick);
      n_load++;
      if (cl) n_both++;
    end else if (cl) begin
      model = '0;
      n_clear++;
    end else begin
      n_hold++;
    end
    @(posedge clk); #1;
    checks++;
    if (sum !== model) begin
      failures++;
      $display("sel=%b load=%b clear=%b sum=%h expected %h", s, ld, cl, sum, model);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("tb_datapath: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 8'd0; b = 8'd0; c = 8'd0; d = 8'd0;
    sel = 2'b00; load = 1'b0; clear = 1'b0;
    model = '0;
    step(2'b11, 1'b0, 1'b1);               // clear to a defined value

    repeat (500) begin
      // inputs change right after the checked edge, ahead of the next one
      a = num_t'($urandom); b = num_t'($urandom);
      c = num_t'($urandom); d = num_t'($urandom);
      step(sel_t'($urandom), 1'($urandom), 1'($urandom_range(0, 3) == 0));
    end

    // one full computation that overflows: 200+100+50+30 = 380 -> 124
    a = 8'd200; b = 8'd100; c = 8'd50; d = 8'd30;
    step(2'b11, 1'b0, 1'b1);
    step(2'b00, 1'b1, 1'b0);
    step(2'b01, 1'b1, 1'b0);
    step(2'b10, 1'b1, 1'b0);
    step(2'b11, 1'b1, 1'b0);
    checks++;
    if (sum !== 8'd124) begin
      failures++;
      $display("full sum %0d expected 124", sum);
    end
    step(2'b11, 1'b0, 1'b0);               // hold keeps it
    checks++;
    if (sum !== 8'd124) begin failures++; $display("hold lost the sum"); end

    checks++;
    if (n_load == 0 || n_clear == 0 || n_hold == 0 || n_both == 0) begin
      failures++;
      $display("control coverage incomplete");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
