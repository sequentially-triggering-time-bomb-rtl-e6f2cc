// tb_ht_payload: self-checking test of the Trojan payload XOR.
//
// Checks all four combinations of signal and trigger, for the inserted gate
// (EN = 1: the signal is inverted while the trigger is high) and for the
// left-out gate (EN = 0: the signal always passes).
module tb_ht_payload;
  logic sig, trig;
  logic p_on, p_off;
  int checks = 0, failures = 0;

  ht_payload             dut_on  (.sig(sig), .trig(trig), .sig_p(p_on));
  ht_payload #(.EN(1'b0)) dut_off (.sig(sig), .trig(trig), .sig_p(p_off));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {sig, trig} = 2'(v);
      #1;
      checks += 2;
      if (p_on !== (trig ? ~sig : sig)) begin
        failures++;
        $display("FAIL inserted: sig=%b trig=%b out=%b", sig, trig, p_on);
      end
      if (p_off !== sig) begin
        failures++;
        $display("FAIL left out: sig=%b trig=%b out=%b", sig, trig, p_off);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
