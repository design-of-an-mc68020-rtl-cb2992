// tb_mlc_grant -- checks the MLC grant and delayed grants against a model:
// S45 is the value of (S4 or S5) at the previous falling ARBCLK edge,
// MLCSMBGL = S45 or S4, MLCBGL adds S6, the HOST and EX_CPU grants are
// delayed by one falling edge, CPSMDBGL follows CPSMBGL on the rising edge
// and is forced inactive by CPDKRSTL.  Also replays S4 -> S5 -> S6 -> S1.
// ARBCLK period 10 ns; arbiter states change 1 ns after the rising edge and
// outputs are checked 1 ns after each edge.  The equations follow the
// interface's grant device; the random state sequence is the testbench's.
module tb_mlc_grant;
  logic arbclk = 0, por_n = 1;
  logic s4_n = 1, s5_n = 1, s6_n = 1, cpsmbg_n = 1, sysmbg_n = 1, cpdkrst_n = 1;
  logic mlcsmbg_n, mlcbg_n, cpsm2dbg_n, sysmdbg_n, cpsmdbg_n;
  int checks = 0, failures = 0;
  logic m_s45 = 0, m_cp = 1, m_sys = 1, m_dk = 1;

  mlc_grant dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always #5 arbclk = !arbclk;

  task automatic cmp(string w);
    check({w, " mlcsmbg"}, mlcsmbg_n == !(m_s45 || !s4_n));
    check({w, " mlcbg"}, mlcbg_n == !(m_s45 || !s4_n || !s6_n));
    check({w, " cpsm2dbg"}, cpsm2dbg_n == m_cp);
    check({w, " sysmdbg"}, sysmdbg_n == m_sys);
    check({w, " cpsmdbg"}, cpsmdbg_n == m_dk);
  endtask

  initial begin
    #1 por_n = 0;
    #1 cmp("reset");
    por_n = 1;
    for (int i = 0; i < 3000; i++) begin
      // change inputs after the rising edge, as the arbiter does
      @(posedge arbclk);
      m_dk = cpdkrst_n ? cpsmbg_n : 1'b1;
      #1;
      case ($urandom % 4)
        0: {s4_n, s5_n, s6_n} = 3'b011;
        1: {s4_n, s5_n, s6_n} = 3'b101;
        2: {s4_n, s5_n, s6_n} = 3'b110;
        default: {s4_n, s5_n, s6_n} = 3'b111;
      endcase
      cpsmbg_n = 1'($urandom); sysmbg_n = 1'($urandom);
      cpdkrst_n = ($urandom % 8) != 0;
      if (!cpdkrst_n) m_dk = 1'b1;
      #1 cmp("after rise");
      @(negedge arbclk);
      m_s45 = !s4_n || !s5_n; m_cp = cpsmbg_n; m_sys = sysmbg_n;
      #1 cmp("after fall");
    end
    // S6 keeps MLCBGL but not MLCSMBGL once S45 has gone
    @(posedge arbclk); #1 {s4_n, s5_n, s6_n} = 3'b101;
    @(negedge arbclk); @(posedge arbclk); #1 {s4_n, s5_n, s6_n} = 3'b110;
    #1 check("S6 first half: both grants", !mlcbg_n && !mlcsmbg_n);
    @(negedge arbclk); #1 check("S6: only MLCBGL", !mlcbg_n && mlcsmbg_n);
    @(posedge arbclk); #1 {s4_n, s5_n, s6_n} = 3'b111;
    #1 check("after S6: released", mlcbg_n && mlcsmbg_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
