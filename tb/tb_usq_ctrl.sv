// tb_usq_ctrl: self-checking test of the microsequencer's gate network.
//
// For every state line S0..S7, every button pair x1x0 and both values of the
// separate x1 copy of the S5 load term, the outputs are compared with a
// transition table written out in this testbench: the control lines INC, /PL,
// /RES, the load value Y where a load happens, the LED outputs, and the next
// state that the register would take from those lines. Cells the table marks
// as "don't care" for x1 or x0 are expanded to both values.
module tb_usq_ctrl;
  import usq_pkg::*;

  logic [DEC_N-1:0] s;
  logic             x1, x0, x1_pl5;
  reg_ctl_t         ctl;
  logic             z1, z0;
  int checks = 0, failures = 0;

  usq_ctrl dut (.s(s), .x1(x1), .x0(x0), .x1_pl5(x1_pl5), .ctl(ctl), .z1(z1), .z0(z0));

  // Expected row: next state, INC, /PL, /RES, outputs z1z0.
  typedef struct {
    int   nxt;
    logic inc, pl_n, res_n;
    logic [1:0] z;
  } row_t;

  function automatic row_t table_row(int st, logic b1, logic b0);
    row_t r;
    r = '{nxt: st, inc: 1'b0, pl_n: 1'b1, res_n: 1'b1, z: 2'b00};  // hold
    case (st)
      1: if (!b1)          r = '{1, 1'b0, 1'b1, 1'b0, 2'b00};        // 0-: reset
         else if (!b0)     r = '{4, 1'b0, 1'b0, 1'b1, 2'b00};        // 10: load 100
         else              r = '{2, 1'b1, 1'b1, 1'b1, 2'b00};        // 11: increment
      2: if (b1)           r = '{2, 1'b0, 1'b1, 1'b1, 2'b00};        // 1-: hold
         else if (!b0)     r = '{3, 1'b1, 1'b1, 1'b1, 2'b00};        // 00: increment
         else              r = '{1, 1'b1, 1'b0, 1'b1, 2'b00};        // 01: load 001
      3:                   r = '{3, 1'b0, 1'b1, 1'b1, 2'b10};        // --: green
      4: if (b1)           r = '{4, 1'b0, 1'b1, 1'b1, 2'b00};        // 1-: hold
         else if (!b0)     r = '{1, 1'b0, 1'b1, 1'b0, 2'b00};        // 00: reset
         else              r = '{5, 1'b1, 1'b1, 1'b1, 2'b00};        // 01: increment
      5: if (!b1 && !b0)   r = '{6, 1'b1, 1'b1, 1'b1, 2'b00};        // 00: increment
         else if (b1 && b0) r = '{4, 1'b0, 1'b0, 1'b1, 2'b00};       // 11: load 100
         else              r = '{5, 1'b0, 1'b1, 1'b1, 2'b00};        // 01, 10: hold
      6:                   r = '{6, 1'b0, 1'b1, 1'b1, 2'b01};        // --: red
      default: ;                                                     // S0, S7: hold
    endcase
    return r;
  endfunction

  initial begin
    row_t r;
    int   nxt;
    for (int st = 0; st < 8; st++) begin
      for (int v = 0; v < 8; v++) begin
        s = DEC_N'(1) << st;
        {x1_pl5, x1, x0} = 3'(v);
        #1;
        // The table is written for x1_pl5 == x1; where they differ only the S5 load term sees x1_pl5.
        r = table_row(st, x1, x0);
        if (st == 5 && x1_pl5 != x1) begin
          if (x1_pl5 && x0)      r = '{4, r.inc, 1'b0, 1'b1, 2'b00};  // load 100 forced
          else if (x1 && x0)     r = '{5, 1'b0, 1'b1, 1'b1, 2'b00};   // load suppressed: hold
        end
        // next state from the control lines, register priority /RES > /PL > INC
        if (!ctl.res_n)     nxt = 1;
        else if (!ctl.pl_n) nxt = int'(ctl.y);
        else if (ctl.inc)   nxt = st + 1;
        else                nxt = st;
        checks++;
        if (ctl.inc !== r.inc || ctl.pl_n !== r.pl_n || ctl.res_n !== r.res_n ||
            {z1, z0} !== r.z || nxt != r.nxt) begin
          failures++;
          $display("FAIL S%0d x1x0=%b%b x1_pl5=%b: INC=%b /PL=%b /RES=%b Y=%b Z=%b%b next=S%0d; expected INC=%b /PL=%b /RES=%b Z=%b next=S%0d",
                   st, x1, x0, x1_pl5, ctl.inc, ctl.pl_n, ctl.res_n, ctl.y, z1, z0, nxt,
                   r.inc, r.pl_n, r.res_n, r.z, r.nxt);
        end
        // Y3 and Y1 are tied low in every state
        checks++;
        if (ctl.y[3] !== 1'b0 || ctl.y[1] !== 1'b0) begin
          failures++;
          $display("FAIL S%0d: Y=%b has Y3 or Y1 set", st, ctl.y);
        end
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
