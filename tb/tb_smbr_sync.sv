// tb_smbr_sync -- checks the request synchronisers: SPYDER-T, EX_CPU and
// HOST requests appear on the next rising ARBCLK edge and not before; the
// MLC request on the next falling MLCLK edge.  Random request patterns for
// 2000 clocks, plus the power-on reset value.
// ARBCLK period 10 ns, MLCLK 20 ns; requests change on the falling ARBCLK
// edge and are checked 1 ns after each edge.  The
// clock edges used follow the interface's synchroniser device.
module tb_smbr_sync;
  logic arbclk = 0, mlclk = 0, por_n = 1;
  logic spybr_n = 1, sysmbr_n = 1, cpsmbr_n = 1, mlcsmbr_n = 1;
  logic spybr1_n, sysmbr1_n, cpsmbr1_n, mlcsmbr1_n;
  int checks = 0, failures = 0;

  smbr_sync dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always #5 arbclk = !arbclk;
  always #10 mlclk = !mlclk;

  initial begin
    #1 por_n = 0;
    #2;
    check("reset", {spybr1_n, sysmbr1_n, cpsmbr1_n, mlcsmbr1_n} == 4'b1111);
    por_n = 1;
    for (int i = 0; i < 2000; i++) begin
      logic [3:0] v, prev;
      @(negedge arbclk);
      v = 4'($urandom);
      {spybr_n, sysmbr_n, cpsmbr_n} = v[2:0];
      prev = {mlcsmbr1_n, spybr1_n, sysmbr1_n, cpsmbr1_n};
      #1 check("no change prev edge", {spybr1_n, sysmbr1_n, cpsmbr1_n} == prev[2:0]);
      @(posedge arbclk); #1;
      check("arb sync", {spybr1_n, sysmbr1_n, cpsmbr1_n} == v[2:0]);
      if (mlclk) begin
        mlcsmbr_n = v[3];
        @(negedge mlclk); #1;
        check("mlc sync on falling MLCLK", mlcsmbr1_n == v[3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
