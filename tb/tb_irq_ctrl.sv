// tb_irq_ctrl -- HOST writes and reads of the Interrupt Request Register,
// EX_CPU acknowledges, SPYDER-T interrupts and interrupt-enable changes.
// The model: a write with D31 = 0 leaves a pending EX_CPU request (IRR bit
// 31 reads 0) that reaches the EX_CPU only while HOST INTEN is set and is
// removed by the acknowledge or reset; a write with D30 = 0 interrupts the
// MLC for the length of the write, as does the SPYDER-T interrupt line.
module tb_irq_ctrl;
  logic rst_n = 1, cp0rw_n = 1, cp0ds_n = 1, cp0as_n = 1, cpuirs_n = 1, cpdb31 = 1, cpdb30 = 1;
  logic spyint0_n = 1, sirqen_h = 0, sysiack_n = 1, cpiack_n = 1, cpdbse_n = 1;
  logic sirq_n, cpuirq_n, mlcirq_n, cp2db31, rd_en, cpdben_n;
  logic m = 1;
  int checks = 0, failures = 0, reqs = 0, acks = 0;

  irq_ctrl dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic cmp();
    check("pending", sirq_n == m);
    check("to ex_cpu", cpuirq_n == !(!m && sirqen_h));
    check("read back", cp2db31 == m);
    check("buffer", cpdben_n == !((!cpiack_n || !cpdbse_n) && !cp0as_n));
  endtask

  initial begin
    #1 rst_n = 0;
    #1 rst_n = 1;
    cmp();
    for (int i = 0; i < 10000; i++) begin
      #5;
      sirqen_h = ($urandom % 4) != 0;
      spyint0_n = ($urandom % 5) != 0;
      {cp0as_n, cpiack_n, cpdbse_n} = 3'($urandom);
      #1 check("spyder -> mlc", mlcirq_n == spyint0_n);
      cmp();
      case ($urandom % 4)
        0: begin  // IRR write
          cpuirs_n = 0; cp0rw_n = 0; cpdb31 = 1'($urandom); cpdb30 = 1'($urandom);
          cp0ds_n = 0;
          #1 check("mlc interrupt", mlcirq_n == !(!cpdb30 || !spyint0_n));
          check("no read", !rd_en);
          #5 cp0ds_n = 1;
          m = cpdb31;
          if (!cpdb31) reqs++;
          #1 cmp();
          check("write strobe ends mlc int", mlcirq_n == spyint0_n);
        end
        1: begin  // IRR read
          cpuirs_n = 0; cp0rw_n = 1; cp0ds_n = 0;
          #1 check("read enable", rd_en);
          cmp();
          cp0ds_n = 1;
        end
        2: begin  // EX_CPU acknowledge
          sysiack_n = 0; m = 1; acks++;
          #1 cmp();
          sysiack_n = 1;
        end
        default: if ($urandom % 10 == 0) begin
          rst_n = 0; m = 1;
          #1 cmp();
          rst_n = 1;
        end
      endcase
      cpuirs_n = 1; cp0rw_n = 1;
      #1 cmp();
    end
    check("requests and acknowledges", reqs > 0 && acks > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
