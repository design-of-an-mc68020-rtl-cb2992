// tb_isr_violation -- random write violations, ISR reads and clears,
// SPYDER-T cycles inside and outside its permitted space and BIM channel 2
// acknowledges.  The model: a violation sets its ISR bit at once and the
// bit stays until an ISR write or reset clears it;
// WRTVL is active while any bit is set; SPYIAL goes active when a SPYDER-T
// address strobe ends outside its shared-memory space, follows each later
// cycle, and is cleared by the
// acknowledge.
module tb_isr_violation;
  logic rst_n = 1, cpeewv_n = 1, cpsrpwv_n = 1, ldeewv_n = 1, isrd_n = 1, isrc_n = 1;
  logic spysmsp_n = 0, spyas_n = 0, clrspia_n = 1;
  logic [2:0] flags;
  logic [7:0] rdata;
  logic rd_en, wrtv_n, spyia_n;
  logic [2:0] m = 0;
  logic m_ia = 1;
  int checks = 0, failures = 0, sets = 0, clears = 0, illegal = 0;

  isr_violation dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic cmp();
    check("flags", flags == m);
    check("wrtv", wrtv_n == (m == 0));
    check("spyia", spyia_n == m_ia);
    check("read data", rdata == {m, 5'b0});
    check("read enable", rd_en == !isrd_n);
  endtask

  initial begin
    #1 rst_n = 0;
    #1 rst_n = 1; spyas_n = 1;
    #1 cmp();
    for (int i = 0; i < 20000; i++) begin
      #5;
      case ($urandom % 6)
        0: begin  // a violation pulse on one source
          logic [2:0] v;
          v = 3'(1 << ($urandom % 3));
          {cpeewv_n, cpsrpwv_n, ldeewv_n} = ~v;
          m |= v; sets++;
          #1 cmp();
          {cpeewv_n, cpsrpwv_n, ldeewv_n} = '1;
        end
        1: begin  // ISR clear (write)
          isrc_n = 0; m = 0; clears++;
          #1 cmp();
          isrc_n = 1;
        end
        2: begin  // ISR read
          isrd_n = 0;
          #1 cmp();
          isrd_n = 1;
        end
        3: begin  // SPYDER-T cycle
          logic bad;
          bad = ($urandom % 3) == 0;
          spyas_n = 0; spysmsp_n = bad;
          #1 cmp();
          spyas_n = 1;
          m_ia = !bad;   // the latch is re-clocked by every cycle
          if (bad) illegal++;
          #1 cmp();
          spysmsp_n = 0;
        end
        4: begin  // BIM channel 2 acknowledge
          clrspia_n = 0; m_ia = 1;
          #1 cmp();
          clrspia_n = 1;
        end
        default: if ($urandom % 20 == 0) begin
          rst_n = 0; m = 0; m_ia = 1;
          #1 cmp();
          rst_n = 1;
        end
      endcase
      #1 cmp();
    end
    check("all mechanisms", sets > 0 && clears > 0 && illegal > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
