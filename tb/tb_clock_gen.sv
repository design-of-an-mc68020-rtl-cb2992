// tb_clock_gen -- measures the period of each divided clock in oscillator
// periods: CPCLK = OSC66/2, SPYCLK = OSC66/4, PERIFCLK = OSC66/8,
// M20CLK = HIFICLK = OSC40/2, and checks that reset holds them low.
// Oscillator stand-ins with 30 and 50 ns periods (only ratios are checked);
// reset held for 200 ns.  The
// ratios follow the interface's clock sheets; the reset level is this
// design's choice.
module tb_clock_gen;
  logic osc66 = 0, osc40 = 0, por_n = 1;
  logic cpclk, spyclk, perifclk, m20clk, hificlk;
  int checks = 0, failures = 0;
  int n66 = 0, n40 = 0;
  int last_cp = 0, last_spy = 0, last_per = 0, last_m20 = 0, last_hifi = 0;

  clock_gen dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always #15 osc66 = !osc66;   // 15 ns half period: stands for 66.66 MHz
  always #25 osc40 = !osc40;   // 25 ns half period: stands for 40 MHz
  always @(posedge osc66) n66++;
  always @(posedge osc40) n40++;

  always @(posedge cpclk) if (por_n) begin
    if (last_cp != 0) check("cpclk = osc66/2", n66 - last_cp == 2);
    last_cp = n66;
  end
  always @(posedge spyclk) if (por_n) begin
    if (last_spy != 0) check("spyclk = osc66/4", n66 - last_spy == 4);
    last_spy = n66;
  end
  always @(posedge perifclk) if (por_n) begin
    if (last_per != 0) check("perifclk = osc66/8", n66 - last_per == 8);
    last_per = n66;
  end
  always @(posedge m20clk) if (por_n) begin
    if (last_m20 != 0) check("m20clk = osc40/2", n40 - last_m20 == 2);
    last_m20 = n40;
  end
  always @(posedge hificlk) if (por_n) begin
    if (last_hifi != 0) check("hificlk = osc40/2", n40 - last_hifi == 2);
    last_hifi = n40;
  end

  initial begin
    #1 por_n = 0;
    #200 check("held in reset", !cpclk && !spyclk && !perifclk && !m20clk && !hificlk);
    por_n = 1;
    #20000;
    check("clocks ran", last_per > 0 && last_hifi > 0 && checks > 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
