// tb_bus_error_timer -- bus cycles that are acknowledged after a random
// number of clocks or never.  Unacknowledged cycles must get BERR exactly
// TIMEOUT_CLKS rising clock edges after the address strobe (128 for the
// default instance, 5 for a short one), acknowledged cycles never, and BERR
// must end with the address strobe.
// Clock period 10 ns; strobes change on the falling edge and outputs are
// checked 1 ns after the rising edge.  The counter
// structure comes from the interface's timer sheets; the terminal counts
// checked are the parameters, and the acknowledge timing is random.
module tb_bus_error_timer;
  logic clk = 0, as_n = 0, ack_n = 1;
  logic berr_n, berr5_n;
  logic [7:0] count, count5;
  int checks = 0, failures = 0, timeouts = 0;

  bus_error_timer dut (.clk, .as_n, .ack_n, .berr_n, .count);
  bus_error_timer #(.TIMEOUT_CLKS(5)) short_dut (.clk, .as_n, .ack_n, .berr_n(berr5_n), .count(count5));

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always #5 clk = !clk;

  initial begin
    #1 as_n = 1;
    #1 check("idle", berr_n && berr5_n && count == 0);
    for (int i = 0; i < 200; i++) begin
      int ack_at;
      @(negedge clk);
      as_n = 0; ack_n = 1;
      ack_at = ($urandom % 3 == 0) ? 1000 : int'($urandom % 160);
      for (int c = 1; c <= 140; c++) begin
        if (c == ack_at) ack_n = 0;
        @(posedge clk); #1;
        check("default berr", berr_n == !(ack_at > 128 && c >= 128));
        check("short berr", berr5_n == !(ack_at > 5 && c >= 5));
        @(negedge clk);
      end
      if (!berr_n) timeouts++;
      as_n = 1; ack_n = 1;
      #1 check("berr ends with AS", berr_n && berr5_n && count == 0 && count5 == 0);
    end
    check("timeouts seen", timeouts > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
