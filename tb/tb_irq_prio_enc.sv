// tb_irq_prio_enc -- exhaustive check of the 8-to-3 priority encoder
// against a reference that scans the inputs from the highest level down.
// Combinational; outputs checked 1 ns after each of the 256 input patterns.
// All signals active low, as on the 74LS148 the interface uses.
module tb_irq_prio_enc;
  logic ei_n;
  logic [7:0] in_n;
  logic [2:0] a_n;
  logic gs_n, eo_n;
  int checks = 0, failures = 0;

  irq_prio_enc dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) begin
      int top;
      {ei_n, in_n} = 9'(i);
      #1;
      top = -1;
      for (int k = 7; k >= 0; k--) if (top < 0 && !in_n[k]) top = k;
      if (ei_n) check("disabled", a_n == 3'b111 && gs_n && eo_n);
      else if (top < 0) check("no request", a_n == 3'b111 && gs_n && !eo_n);
      else check("highest level", a_n == ~3'(top) && !gs_n && eo_n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
