// tb_host_reset -- HOST reset sources and their durations in BFRM clocks.
// After power-on, and after each GPIT reset request (of random length and
// phase), the HOST reset must stay active for exactly three BFRM rising
// edges after the request ends, and the GPIT latch must be released on the
// third.  A System Control HOST RST must reset the HOST at once and clear
// the System Control Register two BFRM edges later (the model plays the
// register, dropping HOST RST when the clear arrives).  Halt and the
// reset/halt indication are checked as combinational functions.
module tb_host_reset;
  logic bfrm = 0, prst_n = 1, cuprst_h = 0, cuphlt_h = 0, cphoren_h = 0, gprst_h = 0;
  logic cphor_h, cprst_h, cphlt_h, gprst1_n, sycrgc_n;
  int checks = 0, failures = 0, gp = 0, cu = 0;

  host_reset dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always #50 bfrm = !bfrm;

  task automatic reset_length(string what);
    // called just after the request has ended, between BFRM edges
    for (int e = 1; e <= 4; e++) begin
      @(posedge bfrm); #1;
      check({what, ": reset length"}, cprst_h == (e < 3));
      check({what, ": latch"}, gprst1_n == (e >= 3));
    end
    repeat (3) @(posedge bfrm);   // synchroniser empties
  endtask

  initial begin
    #1 prst_n = 0;
    #1 check("power-on resets", cprst_h && !gprst1_n && sycrgc_n);
    @(posedge bfrm); @(posedge bfrm);
    #7 check("held during power-on", cprst_h);
    prst_n = 1;
    reset_length("power-on");
    check("out of reset", !cprst_h);
    for (int i = 0; i < 150; i++) begin
      #(1 + $urandom % 90);
      cuphlt_h = 1'($urandom); cphoren_h = 1'($urandom);
      #1 check("halt", cphlt_h == cuphlt_h);
      check("indication", cphor_h == (cphoren_h && cuphlt_h));
      cuphlt_h = 0;
      if ($urandom % 2) begin
        gp++;
        @(negedge bfrm);
        #(1 + $urandom % 20) gprst_h = 1;
        #1 check("gpit reset at once", cprst_h && !gprst1_n);
        #($urandom % 20) gprst_h = 0;   // ends before the next rising edge
        reset_length("gpit");
      end else begin
        int edges;
        cu++;
        @(negedge bfrm);
        cuprst_h = 1;
        #1 check("host rst at once", cprst_h);
        edges = 0;
        while (sycrgc_n && edges < 6) begin
          @(posedge bfrm); edges++; #1;
        end
        check("register cleared two edges later", edges == 2);
        cuprst_h = 0;      // the System Control Register is cleared
        #1 check("host rst released", !cprst_h);
        @(posedge bfrm); @(posedge bfrm); #1;
        check("clear pulse ends", sycrgc_n);
      end
    end
    check("both sources", gp > 0 && cu > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
