// tb_sys_regs -- random EX_CPU writes of the System Control, vector and
// interrupt registers with clears from the reset logic.  A model of the
// three registers predicts the control outputs, the vector/status word
// (vector in D7..0, HOST function code in D23..21, HOST reset in D20) and
// the HOST interrupt line.
// Writes are 1 ns strobe pulses every 7 ns; the data changes as the strobe
// ends, and outputs are checked 1 ns later.  The
// bit maps follow the interface's register tables; the status-field
// placement is this design's choice.
module tb_sys_regs;
  logic por_n = 1, sycrgc_n = 1, wr_ctl = 0, wr_vec = 0, wr_int = 0, cprst_h = 0;
  logic [7:0] wdata = 0;
  logic [2:0] cpfc = 0;
  logic [7:0] ctl;
  logic [31:0] vec_stat;
  logic cuprst_h, cuphlt_h, sirqen_h, hostint_n;
  logic [7:0] m_ctl = 0, m_vec = 0;
  logic m_int = 1;
  int checks = 0, failures = 0;

  sys_regs dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic cmp();
    check("ctl", ctl == m_ctl);
    check("host rst", cuprst_h == m_ctl[7]);
    check("host hlt", cuphlt_h == m_ctl[6]);
    check("host inten", sirqen_h == m_ctl[5]);
    check("vector", vec_stat[7:0] == m_vec);
    check("status fc", vec_stat[23:21] == cpfc);
    check("status rst", vec_stat[20] == cprst_h);
    check("unused zero", vec_stat[31:24] == 0 && vec_stat[19:8] == 0);
    check("host int", hostint_n == m_int);
  endtask

  initial begin
    #1 por_n = 0;
    #1 cmp();
    por_n = 1;
    for (int i = 0; i < 10000; i++) begin
      #5;
      cpfc = 3'($urandom); cprst_h = 1'($urandom);
      wdata = 8'($urandom);
      case ($urandom % 5)
        0: begin wr_ctl = 1; m_ctl = wdata; end
        1: begin wr_vec = 1; m_vec = wdata; end
        2: begin wr_int = 1; m_int = !wdata[7]; end
        3: begin sycrgc_n = 0; m_ctl = 0; end
        default: if ($urandom % 10 == 0) begin
          por_n = 0; m_ctl = 0; m_vec = 0; m_int = 1;
        end
      endcase
      #1 {wr_ctl, wr_vec, wr_int} = '0;
      sycrgc_n = 1; por_n = 1;
      wdata = 8'($urandom);   // data changes after the strobe: must not load
      #1 cmp();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
