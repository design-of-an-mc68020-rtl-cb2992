// tb_host_dsack -- runs HOST cycles of every kind the acknowledge logic
// serves and checks on which SPYCLK edge DSACK0 or DSACK1 appears:
// program EEPROM 4 clocks (DSACK1), LAPD EEPROM 3 (DSACK1), CSA at once
// (DSACK1), IRR and HIFI-64 3 (DSACK0), other registers 1 (DSACK0), and the
// MFP/BIM/UART acknowledges passed straight through.  Between cycles the
// counter must return to zero.
module tb_host_dsack;
  logic spyclk = 0, cp0as_n = 1, cpees_n = 1, cpsmdbg_n = 1, cldsms_n = 1, cldesp_n = 1;
  logic cpuirs_n = 1, perifdk_n = 1, hifics_n = 1, mfpdk0_n = 1, bdk0_n = 1, udk0_n = 1;
  logic perifcs_n = 1, biackin_n = 1;
  logic resen0_n, cpdsack0_n, cpdsack1_n;
  logic [3:0] w;
  int checks = 0, failures = 0;
  int seen[8];

  host_dsack dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always #30 spyclk = !spyclk;

  task automatic idle();
    {cp0as_n, cpees_n, cpsmdbg_n, cldsms_n, cldesp_n, cpuirs_n, perifdk_n, hifics_n} = '1;
    {mfpdk0_n, bdk0_n, udk0_n, perifcs_n, biackin_n} = '1;
  endtask

  initial begin
    // the counter registers start unknown: pull resen0 low once
    cpees_n = 0;
    #1 idle();
    for (int i = 0; i < 800; i++) begin
      int kind, lat;
      logic want0;
      @(negedge spyclk);
      idle();
      #1 check("idle: counter clear", w == 4'b0000 && !resen0_n);
      check("idle: no dsack", cpdsack0_n && cpdsack1_n);
      kind = $urandom % 8;
      seen[kind]++;
      cp0as_n = 0;
      want0 = 1;
      case (kind)
        0: begin cpees_n = 0; lat = 4; want0 = 0; end
        1: begin cpsmdbg_n = 0; cldesp_n = 0; lat = 3; want0 = 0; end
        2: begin cpsmdbg_n = 0; cldsms_n = 0; lat = 0; want0 = 0; end
        3: begin perifcs_n = 0; perifdk_n = 0; cpuirs_n = 0; lat = 3; end
        4: begin perifcs_n = 0; hifics_n = 0; lat = 3; end
        5: begin perifcs_n = 0; perifdk_n = 0; lat = 1; end
        6: begin perifcs_n = 0; lat = -1; end
        default: begin biackin_n = 0; lat = -1; end
      endcase
      for (int c = 0; c <= 5; c++) begin
        logic dev;
        if (lat < 0) begin
          dev = ($urandom % 3) == 0;
          {mfpdk0_n, bdk0_n, udk0_n} = '1;
          case ($urandom % 3)
            0: mfpdk0_n = !dev;
            1: bdk0_n = !dev;
            default: udk0_n = !dev;
          endcase
          #1 check("device ack passed", cpdsack0_n == !dev && cpdsack1_n);
        end else begin
          #1;
          check("resen0 active", resen0_n);
          if (want0) check("dsack0 timing", cpdsack0_n == !(c >= lat) && cpdsack1_n);
          else       check("dsack1 timing", cpdsack1_n == !(c >= lat) && cpdsack0_n);
        end
        @(posedge spyclk);
        #1 check("tap count", w == 4'((1 << (c + 1 > 4 ? 4 : c + 1)) - 1));
        @(negedge spyclk);
      end
    end
    for (int k = 0; k < 8; k++) check("every cycle kind run", seen[k] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
