// tb_ht_trigger: self-checking test of the time-bomb trigger.
//
// Counts clock cycles after the clear and checks that the trigger is high in
// exactly the cycles where the count of elapsed edges is 255 modulo 256, for
// the 8-bit counter, over four full periods (1024 cycles). A second instance
// with a 3-bit counter checks the period 2**K. A clear in mid-count must
// restart the period.
module tb_ht_trigger;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic trig8, trig3;
  int   edges = 0;
  int   checks = 0, failures = 0;
  int   fires8 = 0, fires3 = 0;

  ht_trigger              dut8 (.clk(clk), .rst_n(rst_n), .trig(trig8));
  ht_trigger #(.K(3))     dut3 (.clk(clk), .rst_n(rst_n), .trig(trig3));

  always #5 clk = ~clk;

  task automatic check_now();
    checks += 2;
    if (trig8 !== ((edges % 256) == 255)) begin
      failures++;
      $display("FAIL K=8 after %0d edges: trig=%b", edges, trig8);
    end
    if (trig3 !== ((edges % 8) == 7)) begin
      failures++;
      $display("FAIL K=3 after %0d edges: trig=%b", edges, trig3);
    end
    if (trig8) fires8++;
    if (trig3) fires3++;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    check_now();
    for (int i = 0; i < 1024; i++) begin
      @(posedge clk); #1;
      edges++;
      check_now();
    end
    checks++;
    if (fires8 != 4 || fires3 != 128) begin
      failures++;
      $display("FAIL trigger counts: K=8 %0d (4 expected), K=3 %0d (128 expected)", fires8, fires3);
    end
    // Clear in the middle of a period.
    repeat (100) @(posedge clk);
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    edges = 0;
    check_now();
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #1;
      edges++;
      check_now();
    end
    $display("trigger fired: K=8 %0d times, K=3 %0d times", fires8, fires3);
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
