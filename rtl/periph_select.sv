// periph_select -- HOST peripheral and register chip selects.
//
// The peripheral space (PERIFSEL) is qualified by the data strobe through two
// PERIFCLK registers: CPDS1L and then PERIFCSL, both held cleared while the
// HOST address strobe is negated.  PERIFCSL therefore asserts on the second
// PERIFCLK rising edge after DS in peripheral space and gives the slow
// peripherals their address set-up time.  The device selects decode HOST
// A7..A0 with the address strobe and PERIFCSL:
//   MFP   A7..4 = 0000, or 0001 with A3 = 0     BIM  A7..4 = 0011, A0 = 1
//   HIFI  A7..4 = 1000                          UART A7..4 = 1100
//   IRR   F0   CR0 F2   CR1 F4   ISR F6   GP status F8
//   PERIFDKL: register block (A7..4 = 1111, A0 = 0) acknowledged by host_dsack
// The BIM select is also forced while the BIM is held in reset, as the
// interface does.  Decodes and the two-register delay follow the interface's
// peripheral select device.  Outputs active low.
module periph_select
  import lapd_pkg::*;
(
  input  logic       perifclk,   // PERIFCLK (SPYCLK / 2)
  input  logic       perifsel_n, // peripheral space
  input  logic       bimrst_n,   // BIM reset from CR0
  input  logic [7:0] mpab,       // MPAB7..MPAB0
  input  logic       cp0as_n,
  input  logic       cp0ds_n,
  output logic       cpds1_n,
  output logic       perifcs_n,  // delayed peripheral cycle select
  output logic       mfpcs_n,
  output logic       bimcs_n,
  output logic       hifics_n,
  output logic       uartcs_n,
  output logic       cpuirs_n,   // Interrupt Request Register
  output logic       cr0s_n,
  output logic       cr1s_n,
  output logic       irs_n,      // Interrupt Status Register
  output logic       gpstat_n,
  output logic       perifdk_n   // register block acknowledge request
);
  logic sel;

  always_ff @(posedge perifclk or posedge cp0as_n)
    if (cp0as_n) begin
      cpds1_n   <= 1'b1;
      perifcs_n <= 1'b1;
    end else begin
      cpds1_n   <= !(!cp0ds_n && !perifsel_n);
      perifcs_n <= cpds1_n;
    end

  assign sel = !cp0as_n && !perifcs_n;

  assign mfpcs_n   = !(sel && (mpab[7:4] == DEV_MFP || (mpab[7:4] == 4'h1 && !mpab[3])));
  assign bimcs_n   = !((sel && mpab[7:4] == DEV_BIM && mpab[0]) || !bimrst_n);
  assign hifics_n  = !(sel && mpab[7:4] == DEV_HIFI);
  assign uartcs_n  = !(sel && mpab[7:4] == DEV_UART);
  assign cpuirs_n  = !(sel && mpab == REG_IRR);
  assign cr0s_n    = !(sel && mpab == REG_CR0);
  assign cr1s_n    = !(sel && mpab == REG_CR1);
  assign irs_n     = !(sel && mpab == REG_ISR);
  assign gpstat_n  = !(sel && mpab == REG_GPST);
  assign perifdk_n = !(sel && mpab[7:4] == DEV_REGS && !mpab[0]);
endmodule
