// tb_averager: end-to-end test of the four-input summer at its default size.
//
// Random numbers are applied to a..d and update is pulsed; the testbench
// then follows the computation edge by edge and checks the running sum
// 0, a, a+b, a+b+c and the final a+b+c+d (modulo 256), computed here from
// the inputs. It checks that the result appears exactly five edges after
// update is sampled, and that it is held while the machine is idle even
// when the inputs change. It counts each mechanism of the design and fails
// if one never happened: a computation, a sum that wraps past 255, an
// update ignored during a computation, update held high restarting at once,
// idle clocks that keep the result, and a reset.
module tb_averager;
  import averager_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  num_t a, b, c, d, sum;
  logic update, rst;

  averager dut (.a(a), .b(b), .c(c), .d(d), .sum(sum),
                .update(update), .clk(clk), .rst(rst));

  int n_ops = 0, n_wrap = 0, n_ignored = 0, n_backtoback = 0, n_idle = 0, n_reset = 0;

  task automatic check_sum(input num_t exp, input string what);
    checks++;
    if (sum !== exp) begin
      failures++;
      $display("t=%0t %s: sum=%0d expected %0d", $time, what, sum, exp);
    end
  endtask

  // Run one computation. The update sample edge is the next posedge.
  // hold_update keeps update high through the computation (it must be
  // ignored, and it restarts the machine when the computation ends);
  // noise pulses update in the middle of the computation.
  task automatic run_op(input num_t va, vb, vc, vd,
                        input logic hold_update, input logic noise);
    int full;
    @(negedge clk);
    a = va; b = vb; c = vc; d = vd;
    update = 1'b1;
    @(posedge clk); #1;                      // edge E: update sampled
    @(negedge clk);
    update = hold_update;
    @(posedge clk); #1;                      // E+1
    check_sum(8'd0, "after clear");
    @(negedge clk);
    if (noise) begin update = 1'b1; n_ignored++; end
    @(posedge clk); #1;                      // E+2
    check_sum(va, "after add a");
    @(negedge clk);
    update = hold_update;
    if (hold_update) n_ignored++;
    @(posedge clk); #1;                      // E+3
    check_sum(num_t'(va + vb), "after add b");
    @(posedge clk); #1;                      // E+4
    check_sum(num_t'(va + vb + vc), "after add c");
    @(posedge clk); #1;                      // E+5
    check_sum(num_t'(va + vb + vc + vd), "final sum");
    full = int'(va) + int'(vb) + int'(vc) + int'(vd);
    if (full > 255) n_wrap++;
    n_ops++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("tb_averager: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    num_t ra, rb, rc, rd, keep;
    a = '0; b = '0; c = '0; d = '0;
    update = 1'b0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    n_reset++;

    // the worked example: small numbers, no wrap
    run_op(8'd1, 8'd2, 8'd3, 8'd4, 1'b0, 1'b0);
    check_sum(8'd10, "example");

    // a sum that wraps: 255+255+255+255 = 1020 -> 252
    run_op(8'd255, 8'd255, 8'd255, 8'd255, 1'b0, 1'b0);

    // idle: inputs change, update low, result is held
    keep = sum;
    repeat (5) begin
      @(negedge clk);
      a = num_t'($urandom); b = num_t'($urandom);
      c = num_t'($urandom); d = num_t'($urandom);
      @(posedge clk); #1;
      check_sum(keep, "held while idle");
      n_idle++;
    end

    // update pulse during a computation is ignored
    run_op(8'd10, 8'd20, 8'd30, 8'd40, 1'b0, 1'b1);
    @(posedge clk); #1;                      // E+6: idle again, no restart
    check_sum(8'd100, "no restart after ignored pulse");
    checks++;
    if (dut.c1.clear !== 1'b0 || dut.c1.load !== 1'b0) begin
      failures++;
      $display("machine restarted after an ignored update");
    end

    // update held high: the next computation begins right after the last
    run_op(8'd7, 8'd8, 8'd9, 8'd10, 1'b1, 1'b0);
    // E+5 just passed and update is still high: the machine is in hold
    // with update high, so edge E+6 starts a new computation
    @(negedge clk);
    a = 8'd100; b = 8'd101; c = 8'd102; d = 8'd103;
    @(posedge clk); #1;                      // E+6: clear state entered at once
    @(negedge clk);
    update = 1'b0;
    @(posedge clk); #1;
    check_sum(8'd0, "back-to-back clear");
    @(posedge clk); #1;
    check_sum(8'd100, "back-to-back add a");
    repeat (3) @(posedge clk);
    #1;
    check_sum(num_t'(8'd100 + 8'd101 + 8'd102 + 8'd103), "back-to-back final");
    n_backtoback++;
    n_ops++;

    // random computations
    repeat (300) begin
      ra = num_t'($urandom); rb = num_t'($urandom);
      rc = num_t'($urandom); rd = num_t'($urandom);
      run_op(ra, rb, rc, rd, 1'b0, 1'($urandom_range(0, 3) == 0));
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1;
        check_sum(num_t'(ra + rb + rc + rd), "held");
        n_idle++;
      end
    end

    // reset during a computation stops it; the sum register keeps its value
    @(negedge clk);
    a = 8'd1; b = 8'd1; c = 8'd1; d = 8'd1;
    update = 1'b1;
    @(posedge clk); #1;
    @(negedge clk);
    update = 1'b0;
    @(posedge clk); #1;                      // clear done
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk); #1;                      // add a happens on this edge
    @(negedge clk);
    rst = 1'b0;
    keep = sum;
    repeat (3) @(posedge clk);
    #1;
    check_sum(keep, "halted by reset");
    n_reset++;
    run_op(8'd50, 8'd60, 8'd70, 8'd80, 1'b0, 1'b0);

    $display("ops=%0d wraps=%0d ignored=%0d back_to_back=%0d idle=%0d resets=%0d",
             n_ops, n_wrap, n_ignored, n_backtoback, n_idle, n_reset);
    checks++;
    if (n_ops == 0 || n_wrap == 0 || n_ignored == 0 || n_backtoback == 0 ||
        n_idle == 0 || n_reset < 2) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
