// tb_host_ctrl_regs -- random HOST reads and writes of CR0, CR1 and the ISR
// select, with occasional interface resets.  A model of the two registers
// (CR0 keeps D31, D30, D28, D27, D26; CR1 keeps all eight bits) predicts
// the read-back and every decoded control output; the strobes and the SA
// pulse (write of CR0 with D24 = 0) are checked while the data strobe is
// active, the register contents after it ends.
module tb_host_ctrl_regs;
  logic rst_n = 1, cr0s_n = 1, cr1s_n = 1, irs_n = 1, cp0rw_n = 1, cp0ds_n = 1;
  logic [7:0] cpdb_hi = 0;
  logic cr0rd_n, cr0ck_n, cr1rd_n, cr1ck_n, isrd_n, isrc_n, spysa;
  logic [7:0] cr0, cr1, rdata;
  logic mfprst_n, bimrst_n, hifirst_h, mlcrst_n, spyrst_h, cpeewe_h, cpsrwe_h, ldewe_h, rd_en;
  logic [7:0] m0 = 0, m1 = 0;
  int checks = 0, failures = 0, pulses = 0;

  host_ctrl_regs dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic outputs();
    check("cr0", cr0 == m0);
    check("cr1", cr1 == m1);
    check("mfprst", mfprst_n == m0[7]);
    check("bimrst", bimrst_n == m0[6]);
    check("hifirst", hifirst_h == !m0[4]);
    check("mlcrst", mlcrst_n == m0[3]);
    check("spyrst", spyrst_h == !m0[2]);
    check("eewe mp", cpeewe_h == m1[7]);
    check("srwe mp", cpsrwe_h == m1[6]);
    check("eewe ld", ldewe_h == m1[5]);
  endtask

  initial begin
    #1 rst_n = 0;
    #1 check("reset clears", cr0 == 0 && cr1 == 0);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int reg_sel;
      logic wr;
      #10;
      if ($urandom % 50 == 0) begin
        rst_n = 0; m0 = 0; m1 = 0;
        #1 outputs();
        rst_n = 1;
        continue;
      end
      reg_sel = $urandom % 4;
      wr = 1'($urandom);
      cr0s_n = reg_sel != 0; cr1s_n = reg_sel != 1; irs_n = reg_sel != 2;
      cp0rw_n = !wr;
      cpdb_hi = 8'($urandom);
      #5 cp0ds_n = 0;
      #1;
      check("cr0 read strobe", cr0rd_n == !(reg_sel == 0 && !wr));
      check("cr0 write clock", cr0ck_n == !(reg_sel == 0 && wr));
      check("cr1 read strobe", cr1rd_n == !(reg_sel == 1 && !wr));
      check("cr1 write clock", cr1ck_n == !(reg_sel == 1 && wr));
      check("isr read", isrd_n == !(reg_sel == 2 && !wr));
      check("isr clear", isrc_n == !(reg_sel == 2 && wr));
      check("sa pulse", spysa == (reg_sel == 0 && wr && !cpdb_hi[0]));
      if (spysa) pulses++;
      check("read enable", rd_en == (!wr && reg_sel < 2));
      if (!wr && reg_sel == 0) check("read cr0", rdata == m0);
      if (!wr && reg_sel == 1) check("read cr1", rdata == m1);
      #10 cp0ds_n = 1;
      if (wr && reg_sel == 0) m0 = cpdb_hi & 8'b1101_1100;
      if (wr && reg_sel == 1) m1 = cpdb_hi;
      #1 outputs();
      check("sa ends with strobe", !spysa);
      {cr0s_n, cr1s_n, irs_n} = '1;
    end
    check("sa pulses seen", pulses > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
