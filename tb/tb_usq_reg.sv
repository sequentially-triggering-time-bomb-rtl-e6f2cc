// tb_usq_reg: self-checking test of the 4-bit state register.
//
// Drives random combinations of INC, /PL, /RES, load value and occasional
// hard resets, and compares the register after every rising edge with a
// reference value kept in the testbench (reset to S1 first, then load, then
// count, else hold). Also checks that the hard reset acts without a clock edge.
module tb_usq_reg;
  import usq_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n = 1'b1;
  logic             inc = 1'b0, pl_n = 1'b1, res_n = 1'b1;
  logic [REG_W-1:0] d = '0;
  logic [REG_W-1:0] q;
  logic [REG_W-1:0] ref_q;
  int checks = 0, failures = 0;
  int n_inc = 0, n_load = 0, n_res = 0, n_hold = 0;

  usq_reg dut (.clk(clk), .rst_n(rst_n), .inc(inc), .pl_n(pl_n), .res_n(res_n), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [REG_W-1:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0d expected %0d", what, q, exp);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #1 check("async reset", 4'd1);
    ref_q = 4'd1;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      inc   = 1'($urandom);
      pl_n  = ($urandom % 3) != 0;
      res_n = ($urandom % 5) != 0;
      d     = REG_W'($urandom);
      if (!res_n)     begin ref_q = 4'd1;          n_res++;  end
      else if (!pl_n) begin ref_q = d;             n_load++; end
      else if (inc)   begin ref_q = ref_q + 4'd1;  n_inc++;  end
      else            n_hold++;
      @(posedge clk); #1;
      check("step", ref_q);
      if (i % 397 == 396) begin
        // hard reset in the middle of a cycle, no edge needed
        #1 rst_n = 1'b0;
        inc = 1'b0; pl_n = 1'b1; res_n = 1'b1;  // hold until the next random step
        #1 check("async hard reset", 4'd1);
        ref_q = 4'd1;
        @(negedge clk) rst_n = 1'b1;
      end
    end
    checks++;
    if (n_inc == 0 || n_load == 0 || n_res == 0 || n_hold == 0) failures++;
    $display("operations: inc=%0d load=%0d reset=%0d hold=%0d", n_inc, n_load, n_res, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
