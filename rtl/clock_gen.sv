// clock_gen -- clock dividers of the interface.
//
// The 66.66 MHz oscillator is divided by two for the HOST clock CPCLK
// (33.33 MHz), again for the SPYDER-T clock SPYCLK (16.67 MHz) and again for
// the peripheral clock PERIFCLK (8.33 MHz).  The 40 MHz oscillator (ARBCLK)
// is divided by two for the 20 MHz clock M20CLK used by the MLC bus error
// timer and for the HIFI-64 clock.  Each stage is a toggle flip-flop on the
// rising edge of the previous clock, as on the clock sheets; the reset that
// starts all dividers low is this design's own.
module clock_gen (
  input  logic osc66,     // 66.66 MHz oscillator
  input  logic osc40,     // 40 MHz oscillator (ARBCLK)
  input  logic por_n,
  output logic cpclk,     // 33.33 MHz
  output logic spyclk,    // 16.67 MHz
  output logic perifclk,  // 8.33 MHz
  output logic m20clk,    // 20 MHz
  output logic hificlk    // 20 MHz, HIFI-64
);
  always_ff @(posedge osc66 or negedge por_n)
    if (!por_n) cpclk <= 1'b0; else cpclk <= !cpclk;
  always_ff @(posedge cpclk or negedge por_n)
    if (!por_n) spyclk <= 1'b0; else spyclk <= !spyclk;
  always_ff @(posedge spyclk or negedge por_n)
    if (!por_n) perifclk <= 1'b0; else perifclk <= !perifclk;
  always_ff @(posedge osc40 or negedge por_n)
    if (!por_n) m20clk <= 1'b0; else m20clk <= !m20clk;
  always_ff @(posedge osc40 or negedge por_n)
    if (!por_n) hificlk <= 1'b0; else hificlk <= !hificlk;
endmodule
