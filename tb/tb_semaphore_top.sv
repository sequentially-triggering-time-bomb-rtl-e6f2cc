// tb_semaphore_top: end-to-end test of the semaphore microsequencer with the
// time-bomb Trojan, at the design's default parameters (8-bit trigger counter,
// payload on x1 in the S5 load term).
//
// A reference model written here from the state graph (S1..S6, Moore outputs
// green in S3 and red in S6) and from the Trojan description (the trigger is
// high in the 255th cycle after the hard reset and every 256 cycles after
// that; it inverts x1 in the S5 load decision only) predicts the state and the
// LEDs after every clock edge. The test runs:
//   1. the green button sequence 00-01-11-10-00, then checks green stays on;
//   2. the red sequence 00-10-11-01-00, then checks red stays on;
//   3. the Trojan firing while the machine waits in S5 with 01 (S5 -> S4) and
//      while it sees 11 in S5 (load suppressed, S5 held);
//   4. long random button activity with occasional hard resets.
// It counts each register operation the table calls for (increment, load,
// functional reset, hold), hard resets, trigger firings and hijacked
// transitions, and fails if any of them never happened. Only the top's ports
// are observed. The green and red sequences must each take one
// clock per button step.
module tb_semaphore_top;
  import usq_pkg::*;

  logic             clk = 1'b0;
  logic             bres_n = 1'b0;  // held from time zero until the first hard_reset ends
  logic             x1 = 1'b0, x0 = 1'b0;
  logic             z1, z0;
  logic [REG_W-1:0] state;

  int checks = 0, failures = 0;
  int ref_st;            // reference state number
  int ref_cyc;           // clock edges since the last hard reset
  int n_inc = 0, n_load = 0, n_res = 0, n_hold = 0, n_hard = 0;
  int n_trig = 0, n_hijack = 0, n_green = 0, n_red = 0;

  semaphore_top dut (.clk(clk), .bres_n(bres_n), .x1(x1), .x0(x0), .z1(z1), .z0(z0), .state(state));

  always #5 clk = ~clk;

  // Golden next state from the state graph; x1l is the x1 seen by the S5 load decision.
  function automatic int next_state(int st, logic b1, logic b0, logic x1l);
    case (st)
      1: return !b1 ? 1 : (b0 ? 2 : 4);
      2: return b1 ? 2 : (b0 ? 1 : 3);
      3: return 3;
      4: return b1 ? 4 : (b0 ? 5 : 1);
      5: return (x1l && b0) ? 4 : ((!b1 && !b0) ? 6 : 5);
      6: return 6;
      default: return st;
    endcase
  endfunction

  // Register operation the transition table gives for a state and inputs.
  typedef enum {OP_HOLD, OP_INC, OP_LOAD, OP_RES} op_e;
  function automatic op_e op_of(int st, logic b1, logic b0, logic x1l);
    case (st)
      1: return !b1 ? OP_RES : (b0 ? OP_INC : OP_LOAD);
      2: return b1 ? OP_HOLD : (b0 ? OP_LOAD : OP_INC);
      4: return b1 ? OP_HOLD : (b0 ? OP_INC : OP_RES);
      5: return (x1l && b0) ? OP_LOAD : ((!b1 && !b0) ? OP_INC : OP_HOLD);
      default: return OP_HOLD;
    endcase
  endfunction

  task automatic check_outputs(string what);
    checks++;
    if (int'(state) != ref_st || z1 !== (ref_st == 3) || z0 !== (ref_st == 6)) begin
      failures++;
      $display("FAIL %s at edge %0d: state=S%0d z1z0=%b%b expected S%0d", what, ref_cyc,
               state, z1, z0, ref_st);
    end
  endtask

  // One clock step with the given buttons: drive at the falling edge, check after the rising edge.
  task automatic step(logic b1, logic b0);
    logic trig_ref;
    int   golden, trojan;
    @(negedge clk);
    x1 = b1;
    x0 = b0;
    #1;
    if ($test$plusargs("trace")) $display("edge %0d: S%0d x=%b%b", ref_cyc, state, x1, x0);
    trig_ref = (ref_cyc % 256) == 255;
    if (trig_ref) n_trig++;
    case (op_of(ref_st, b1, b0, b1 ^ trig_ref))
      OP_RES:  n_res++;
      OP_LOAD: n_load++;
      OP_INC:  n_inc++;
      default: n_hold++;
    endcase
    golden = next_state(ref_st, b1, b0, b1);
    trojan = next_state(ref_st, b1, b0, b1 ^ trig_ref);
    if (golden != trojan) n_hijack++;
    @(posedge clk);
    #1;
    ref_st = trojan;
    ref_cyc++;
    check_outputs("step");
    if (z1) n_green++;
    if (z0) n_red++;
  endtask

  task automatic hard_reset();
    @(negedge clk);
    bres_n = 1'b0;
    #2;
    ref_st  = 1;
    ref_cyc = 0;
    n_hard++;
    check_outputs("hard reset");
    checks++;
    if (z1 !== 1'b0 || z0 !== 1'b0) begin
      failures++;
      $display("FAIL hard reset: LEDs not off");
    end
    @(posedge clk);  // held through one edge, so the next step is the first one counted
    #1 bres_n = 1'b1;
  endtask

  task automatic sequence_(logic [1:0] a, logic [1:0] b, logic [1:0] c, logic [1:0] d,
                           logic [1:0] e, int exp_end);
    int t0;
    t0 = ref_cyc;
    step(a[1], a[0]); step(b[1], b[0]); step(c[1], c[0]); step(d[1], d[0]); step(e[1], e[0]);
    checks++;
    if (int'(state) != exp_end || ref_cyc - t0 != 5) begin
      failures++;
      $display("FAIL sequence %b-%b-%b-%b-%b ended in S%0d after %0d clocks, expected S%0d after 5",
               a, b, c, d, e, state, ref_cyc - t0, exp_end);
    end
  endtask

  initial begin
    ref_st  = 1;
    ref_cyc = 0;
    hard_reset();

    // 1. green
    sequence_(2'b00, 2'b01, 2'b11, 2'b10, 2'b00, 3);
    checks++;
    if (!(z1 && !z0)) begin failures++; $display("FAIL green LED not on"); end
    repeat (20) step(1'($urandom), 1'($urandom));
    checks++;
    if (!(z1 && !z0)) begin failures++; $display("FAIL green LED not held"); end

    // 2. red
    hard_reset();
    sequence_(2'b00, 2'b10, 2'b11, 2'b01, 2'b00, 6);
    checks++;
    if (!(!z1 && z0)) begin failures++; $display("FAIL red LED not on"); end
    repeat (20) step(1'($urandom), 1'($urandom));

    // 3. Trojan: wait in S5 with 01 through the trigger cycle.
    hard_reset();
    step(1, 0); step(1, 1); step(0, 1);          // S1 -> S4 -> S4 -> S5
    while (ref_cyc % 256 != 255) step(0, 1);     // golden model would stay in S5
    step(0, 1);                                  // trigger: hijacked load to S4
    checks++;
    if (int'(state) != 4) begin
      failures++;
      $display("FAIL Trojan: S5 with 01 at the trigger went to S%0d, expected S4", state);
    end
    // Trojan again: 11 in S5 at the trigger holds S5 instead of loading S4.
    step(0, 1);
    while (ref_cyc % 256 != 255) step(1, 0);     // S4 held with 1-
    step(0, 1);                                  // S4 -> S5 (trigger cycle, no effect outside S5)
    while (ref_cyc % 256 != 255) step(0, 1);     // wait in S5
    step(1, 1);                                  // trigger: load suppressed
    checks++;
    if (int'(state) != 5) begin
      failures++;
      $display("FAIL Trojan: S5 with 11 at the trigger went to S%0d, expected S5", state);
    end

    // 4. random activity, biased to hold buttons for a few clocks like a person would
    for (int i = 0; i < 20000; i++) begin
      logic b1, b0;
      b1 = 1'($urandom);
      b0 = 1'($urandom);
      repeat (1 + $urandom % 4) step(b1, b0);
      if ($urandom % 60 == 0) hard_reset();
    end

    $display("operations: inc=%0d load=%0d reset=%0d hold=%0d hard_reset=%0d", n_inc, n_load,
             n_res, n_hold, n_hard);
    $display("trojan: trigger fired %0d times, hijacked transitions %0d", n_trig, n_hijack);
    $display("leds: green cycles %0d, red cycles %0d", n_green, n_red);
    checks++;
    if (n_inc == 0 || n_load == 0 || n_res == 0 || n_hold == 0 || n_hard == 0 ||
        n_trig == 0 || n_hijack < 2 || n_green == 0 || n_red == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
