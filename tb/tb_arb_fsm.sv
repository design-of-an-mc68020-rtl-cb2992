// tb_arb_fsm -- self-checking testbench of the SMA arbitration state machine.
//
// A reference model written as seven independent next-state terms (one per
// state bit, active-high, as the arbiter's equations define them) runs next
// to the block.  The test first replays directed cases from the arbiter
// description (priority from idle, grant held against a higher-priority
// request, MLC pre-emption through S6, the void state after S6) and then
// drives 20000 clocks of random requests, comparing every grant each clock.
// It also checks that MLCLK toggles every ARBCLK.
module tb_arb_fsm;
  import lapd_pkg::*;

  logic arbclk = 0, por_n = 0;
  logic spy_n = 1, sys_n = 1, cp_n = 1, mlc_n = 1;
  logic spybg_n, sysmbg_n, cpsmbg_n, s4_n, s5_n, s6_n, idle_n, mlclk;
  arb_state_e state;
  int checks = 0, failures = 0;

  arb_fsm dut (.arbclk, .por_n, .spybr1_n(spy_n), .sysmbr1_n(sys_n), .cpsmbr1_n(cp_n),
               .mlcsmbr1_n(mlc_n), .spybg_n, .sysmbg_n, .cpsmbg_n, .s4_n, .s5_n, .s6_n,
               .idle_n, .mlclk, .state);

  always #5 arbclk = !arbclk;

  // Reference: one-hot, active-high state bits r[0..6].
  logic [6:0] r;
  function automatic logic [6:0] ref_next(logic [6:0] c, logic sp, logic sy, logic cpq, logic ml);
    logic [6:0] n;
    logic none;
    none = !sp && !sy && !cpq && !ml;
    n[0] = ((c[0] || c[1] || c[2] || c[3] || c[5]) && none) || (c == 7'b0);
    n[1] = ((c[0] || c[1]) && sp) || (c[2] && sp && !sy) || (c[3] && sp && !cpq) || (c[6] && sp && !ml);
    n[2] = ((c[0] || c[1]) && !sp && sy) || (c[2] && sy) || (c[3] && !sp && !cpq && sy) ||
           (c[6] && !sp && !cpq && !ml && sy);
    n[3] = ((c[0] || c[1] || c[2]) && !sp && !sy && cpq) || (c[3] && cpq) ||
           (c[6] && !sp && !sy && cpq && !ml);
    n[4] = (c[0] || c[1] || c[2] || c[3]) && !sp && !sy && !cpq && ml;
    n[5] = c[4] || (c[5] && !sp && !sy && !cpq && ml);
    n[6] = (c[5] && (sp || sy || cpq)) || (c[6] && ml);
    return n;
  endfunction

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: state=%s ref=%b", what, $time, state.name(), r);
    end
  endtask

  task automatic compare(string what);
    check({what, " spybg"}, spybg_n == !r[1]);
    check({what, " sysmbg"}, sysmbg_n == !r[2]);
    check({what, " cpsmbg"}, cpsmbg_n == !r[3]);
    check({what, " s4"}, s4_n == !r[4]);
    check({what, " s5"}, s5_n == !r[5]);
    check({what, " s6"}, s6_n == !r[6]);
    check({what, " idle"}, idle_n == !r[0]);
  endtask

  // Apply requests just after a falling edge, step one rising edge, compare.
  task automatic step(logic sp, logic sy, logic cq, logic ml, string what);
    @(negedge arbclk);
    spy_n = !sp; sys_n = !sy; cp_n = !cq; mlc_n = !ml;
    @(posedge arbclk);
    r = ref_next(r, sp, sy, cq, ml);
    #1 compare(what);
  endtask

  logic last_mlclk;
  initial begin
    r = 7'b0000001;
    repeat (3) @(posedge arbclk);
    #1 por_n = 1;
    compare("reset");
    // Priority from idle: all four ask, SPYDER wins.
    step(1, 1, 1, 1, "prio-spy");
    check("spy granted", !spybg_n);
    step(0, 1, 1, 1, "spy-drop");
    check("sys next", !sysmbg_n);
    // Grant held although SPYDER (higher priority) asks again.
    step(1, 1, 1, 1, "hold-sys");
    check("sys held", !sysmbg_n && spybg_n);
    step(1, 0, 1, 1, "sys-drop");
    check("spy after sys", !spybg_n);
    step(0, 0, 1, 1, "to-cp");
    check("cp", !cpsmbg_n);
    step(0, 0, 0, 1, "to-mlc");
    check("S4", !s4_n);
    step(0, 0, 0, 1, "S5");
    check("S5", !s5_n);
    step(0, 0, 0, 1, "S5 hold");
    check("S5 held", !s5_n);
    step(0, 0, 1, 1, "preempt");
    check("S6", !s6_n);
    step(0, 0, 1, 1, "S6 hold");
    check("S6 held while MLC asks", !s6_n && cpsmbg_n);
    step(0, 0, 1, 0, "mlc release");
    check("cp after S6", !cpsmbg_n);
    step(0, 0, 0, 1, "cp drop");
    step(0, 0, 0, 1, "S5 again");
    step(1, 0, 0, 1, "spy preempts");
    check("S6 by spy", !s6_n);
    step(0, 0, 0, 0, "void");
    check("void state", state == ARB_VOID && idle_n);
    step(0, 0, 0, 0, "back to idle");
    check("idle after void", !idle_n);
    // Random traffic, requests held for random lengths.
    begin
      logic [3:0] q = 4'b0;
      for (int i = 0; i < 20000; i++) begin
        for (int k = 0; k < 4; k++) if (($urandom % 4) == 0) q[k] = !q[k];
        step(q[0], q[1], q[2], q[3], "random");
      end
    end
    // MLCLK toggles on every ARBCLK rising edge.
    for (int i = 0; i < 8; i++) begin
      last_mlclk = mlclk;
      @(posedge arbclk); #1;
      check("mlclk toggles", mlclk != last_mlclk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
