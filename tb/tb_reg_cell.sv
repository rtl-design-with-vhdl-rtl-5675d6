// tb_reg_cell: self-checking test of the generic register cell.
//
// Two instances are driven with random function outputs and random select
// codes, including the unused codes: one at the default size (8 bits, two
// functions) and one wider (16 bits, three functions). After every rising
// edge each output is compared with a reference register kept in the
// testbench: hold on 0 and on unused codes, func_in[k-1] on code k.
module tb_reg_cell;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // default instance
  logic [1:0] sel0;
  logic [7:0] f0 [2];
  logic [7:0] q0, m0;

  reg_cell u0 (.clk(clk), .sel(sel0), .func_in(f0), .q(q0));

  // wider instance
  logic [1:0]  sel1;
  logic [15:0] f1 [3];
  logic [15:0] q1, m1;

  reg_cell #(.WIDTH(16), .NFUNC(3)) u1 (.clk(clk), .sel(sel1), .func_in(f1), .q(q1));

  int n_hold0 = 0, n_load0 = 0, n_hold1 = 0, n_load1 = 0;

  initial begin
    #100000;
    failures++;
    $display("tb_reg_cell: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // load known values first so the reference starts defined
    @(negedge clk);
    sel0 = 2'd2; f0[0] = 8'h00; f0[1] = 8'h5a;
    sel1 = 2'd3; f1[0] = '0; f1[1] = '0; f1[2] = 16'hbeef;
    @(posedge clk); #1;
    m0 = 8'h5a; m1 = 16'hbeef;
    checks += 2;
    if (q0 !== m0) begin failures++; $display("initial load q0=%h", q0); end
    if (q1 !== m1) begin failures++; $display("initial load q1=%h", q1); end

    repeat (400) begin
      @(negedge clk);
      sel0 = 2'($urandom_range(0, 3));
      f0[0] = 8'($urandom); f0[1] = 8'($urandom);
      sel1 = 2'($urandom_range(0, 3));
      foreach (f1[i]) f1[i] = 16'($urandom);
      // reference next values
      case (sel0)
        2'd1: begin m0 = f0[0]; n_load0++; end
        2'd2: begin m0 = f0[1]; n_load0++; end
        default: n_hold0++;
      endcase
      case (sel1)
        2'd1: begin m1 = f1[0]; n_load1++; end
        2'd2: begin m1 = f1[1]; n_load1++; end
        2'd3: begin m1 = f1[2]; n_load1++; end
        default: n_hold1++;
      endcase
      @(posedge clk); #1;
      checks++;
      if (q0 !== m0) begin
        failures++;
        $display("u0 sel=%0d q=%h expected %h", sel0, q0, m0);
      end
      checks++;
      if (q1 !== m1) begin
        failures++;
        $display("u1 sel=%0d q=%h expected %h", sel1, q1, m1);
      end
    end

    checks++;
    if (n_hold0 == 0 || n_load0 == 0 || n_hold1 == 0 || n_load1 == 0) begin
      failures++;
      $display("select coverage incomplete");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
