// tb_usq_dec: self-checking test of the 1-of-8 state decoder.
//
// Applies all 16 register values and checks that exactly line k is set for
// value k < 8 and that no line is set for values 8..15.
module tb_usq_dec;
  import usq_pkg::*;

  logic [REG_W-1:0] a;
  logic [DEC_N-1:0] s;
  logic [DEC_N-1:0] exp_s;
  int checks = 0, failures = 0;

  usq_dec dut (.a(a), .s(s));

  initial begin
    for (int v = 0; v < 16; v++) begin
      a = REG_W'(v);
      #1;
      exp_s = (v < 8) ? (DEC_N'(1) << v) : '0;
      checks++;
      if (s !== exp_s) begin
        failures++;
        $display("FAIL a=%0d s=%b expected %b", a, s, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
