// tb_sma_bus_mux -- for random address, data and strobes from all four
// masters and each grant (or none), checks that the shared bus carries the
// granted master's signals and that with no grant it is idle.
// Combinational; outputs checked 1 ns after each vector.  The multiplexer
// stands for the interface's bus transceivers, which is this design's
// choice.
module tb_sma_bus_mux;
  logic spybg_n = 1, sysmbg_n = 1, cpsmbg_n = 1, mlcbg_n = 1;
  logic [18:1] spy_a, sys_a, cp_a, mlc_a, smab;
  logic [15:0] spy_d, sys_d, cp_d, mlc_d, smdb_w;
  logic [3:0] spy_s_n, sys_s_n, cp_s_n, mlc_s_n;
  logic smwe_n, smwo_n, smre_n, smro_n;
  int checks = 0, failures = 0;
  int n[5];

  sma_bus_mux dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int g;
      logic [18:1] ea;
      logic [15:0] ed;
      logic [3:0] es;
      {spy_a, sys_a, cp_a, mlc_a} = {$urandom, $urandom, 8'($urandom)};
      {spy_d, sys_d, cp_d, mlc_d} = {$urandom, $urandom};
      {spy_s_n, sys_s_n, cp_s_n, mlc_s_n} = 16'($urandom);
      g = $urandom % 5;
      n[g]++;
      {spybg_n, sysmbg_n, cpsmbg_n, mlcbg_n} = ~(4'b1000 >> g);
      case (g)
        0: begin ea = spy_a; ed = spy_d; es = spy_s_n; end
        1: begin ea = sys_a; ed = sys_d; es = sys_s_n; end
        2: begin ea = cp_a;  ed = cp_d;  es = cp_s_n;  end
        3: begin ea = mlc_a; ed = mlc_d; es = mlc_s_n; end
        default: begin ea = '0; ed = '0; es = 4'hF; end
      endcase
      #1;
      check("address", smab == ea);
      check("data", smdb_w == ed);
      check("strobes", {smwe_n, smwo_n, smre_n, smro_n} == es);
    end
    for (int k = 0; k < 5; k++) check("every owner", n[k] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
