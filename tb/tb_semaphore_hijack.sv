// tb_semaphore_hijack: the time-bomb payload placed on each of the signals the
// same method can reach.
//
// Seven copies of the semaphore run side by side on the same buttons: the
// golden model (no payload), the default Trojan (x1 in the S5 load term), and
// payloads on x1 everywhere, x0, INC, /PL and /RES. A 4-bit trigger counter
// keeps the test short: the trigger fires in one clock of every 16. For each
// copy the testbench evaluates the sequencer equations with the selected
// signal inverted in trigger cycles, applies the register's priority
// (/RES, then /PL, then INC) and checks state and LEDs after every edge. It
// also requires every hijacked copy to leave the golden path at least once,
// and the golden copy to follow the state graph throughout.
module tb_semaphore_hijack;
  import usq_pkg::*;

  localparam int unsigned K  = 4;
  localparam int          NV = 7;
  localparam logic [HJ_W-1:0] MASKS [NV] = '{
    HJ_NONE, HJ_DEFAULT, HJ_W'(1) << HJ_X1, HJ_W'(1) << HJ_X0,
    HJ_W'(1) << HJ_INC, HJ_W'(1) << HJ_PL, HJ_W'(1) << HJ_RES
  };

  logic             clk = 1'b0;
  logic             bres_n = 1'b0;  // held from time zero until the first hard_reset ends
  logic             x1 = 1'b0, x0 = 1'b0;
  logic [NV-1:0]    z1, z0;
  logic [REG_W-1:0] state [NV];

  int checks = 0, failures = 0;
  int ref_st [NV];
  int ref_cyc;
  int n_div [NV];

  for (genvar v = 0; v < NV; v++) begin : g_dut
    semaphore_top #(.HIJACK(MASKS[v]), .HT_WIDTH(K)) dut (
      .clk(clk), .bres_n(bres_n), .x1(x1), .x0(x0),
      .z1(z1[v]), .z0(z0[v]), .state(state[v]));
  end

  always #5 clk = ~clk;

  // Equations of the sequencer with the payload of mask m applied when t = 1.
  function automatic int eq_next(int st, logic b1, logic b0, logic [HJ_W-1:0] m, logic t);
    logic s1, s2, s4, s5, a1, a0, a1l, inc, pl, res;
    logic [3:0] y;
    s1 = (st == 1); s2 = (st == 2); s4 = (st == 4); s5 = (st == 5);
    a1  = b1 ^ (t & m[HJ_X1]);
    a0  = b0 ^ (t & m[HJ_X0]);
    a1l = b1 ^ (t & (m[HJ_X1] | m[HJ_X1_S5PL]));
    inc = (s1 & a1 & a0) | (s2 & !a1) | (s4 & !a1 & a0) | (s5 & !a1 & !a0);
    pl  = (s1 & a1 & !a0) | (s2 & !a1 & a0) | (s5 & a1l & a0);   // active high here
    res = (s1 & !a1) | (s4 & !a1 & !a0);                         // active high here
    inc ^= t & m[HJ_INC];
    pl  ^= t & m[HJ_PL];
    res ^= t & m[HJ_RES];
    y = {1'b0, s1 | s5, 1'b0, s2};
    if (res)      return 1;
    else if (pl)  return int'(y);
    else if (inc) return (st + 1) % 16;
    else          return st;
  endfunction

  // State graph of the golden machine.
  function automatic int graph_next(int st, logic b1, logic b0);
    case (st)
      1: return !b1 ? 1 : (b0 ? 2 : 4);
      2: return b1 ? 2 : (b0 ? 1 : 3);
      4: return b1 ? 4 : (b0 ? 5 : 1);
      5: return (b1 && b0) ? 4 : ((!b1 && !b0) ? 6 : 5);
      default: return st;
    endcase
  endfunction

  task automatic check_all(string what);
    for (int v = 0; v < NV; v++) begin
      checks++;
      if (int'(state[v]) != ref_st[v] || z1[v] !== (ref_st[v] == 3) || z0[v] !== (ref_st[v] == 6)) begin
        failures++;
        $display("FAIL %s copy %0d at edge %0d: S%0d z=%b%b expected S%0d", what, v, ref_cyc,
                 state[v], z1[v], z0[v], ref_st[v]);
      end
    end
  endtask

  task automatic hard_reset();
    @(negedge clk);
    bres_n = 1'b0;
    #2;
    foreach (ref_st[v]) ref_st[v] = 1;
    ref_cyc = 0;
    check_all("hard reset");
    @(posedge clk);
    #1 bres_n = 1'b1;
  endtask

  task automatic step(logic b1, logic b0);
    logic t;
    int   g;
    @(negedge clk);
    x1 = b1;
    x0 = b0;
    t = (ref_cyc % (1 << K)) == (1 << K) - 1;
    g = graph_next(ref_st[0], b1, b0);
    for (int v = 0; v < NV; v++) begin
      int n;
      n = eq_next(ref_st[v], b1, b0, MASKS[v], t);
      if (n != eq_next(ref_st[v], b1, b0, MASKS[v], 1'b0)) n_div[v]++;
      ref_st[v] = n;
    end
    checks++;
    if (ref_st[0] != g) begin
      failures++;
      $display("FAIL equations and state graph disagree at edge %0d", ref_cyc);
    end
    @(posedge clk);
    #1;
    ref_cyc++;
    check_all("step");
  endtask

  initial begin
    foreach (n_div[v]) n_div[v] = 0;
    hard_reset();
    for (int i = 0; i < 6000; i++) begin
      logic b1, b0;
      b1 = 1'($urandom);
      b0 = 1'($urandom);
      repeat (1 + $urandom % 3) step(b1, b0);
      if ($urandom % 25 == 0) hard_reset();
    end
    for (int v = 0; v < NV; v++) begin
      $display("copy %0d (mask %b): %0d hijacked transitions", v, MASKS[v], n_div[v]);
      checks++;
      if ((v == 0) != (n_div[v] == 0)) begin
        failures++;
        $display("FAIL copy %0d: hijacked transitions %0d", v, n_div[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
