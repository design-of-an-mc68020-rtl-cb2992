// smbr_sync -- synchroniser of the four Shared Memory Array bus requests.
//
// The SPYDER-T, EX_CPU and HOST requests are asynchronous to the arbiter and
// are each passed through one flip-flop clocked on the rising edge of ARBCLK
// (40 MHz).  The MLC request is registered on the falling edge of MLCLK (the
// MLCLKI inverted clock), because the MLC drives it from its own 20 MHz clock.
// All signals are active low.  The single register stage per request and the
// clock of each follow the request-sync devices of the interface; the
// power-on reset that forces every synchronised request inactive is this
// design's own.  Outputs change one ARBCLK (or half an MLCLK) after the input.
module smbr_sync (
  input  logic arbclk,      // 40 MHz arbitration clock
  input  logic mlclk,       // 20 MHz MLC clock
  input  logic por_n,       // power-on reset
  input  logic spybr_n,     // SPYDER-T request (SPYBRL)
  input  logic sysmbr_n,    // EX_CPU request (SYSMBRL)
  input  logic cpsmbr_n,    // HOST request (CPSMBRL)
  input  logic mlcsmbr_n,   // MLC request (MLCSMBRL)
  output logic spybr1_n,    // SPYBR1L
  output logic sysmbr1_n,   // SYSMBR1L
  output logic cpsmbr1_n,   // CPSMBR1L
  output logic mlcsmbr1_n   // MLCSMBR1L
);
  always_ff @(posedge arbclk or negedge por_n)
    if (!por_n) {spybr1_n, sysmbr1_n, cpsmbr1_n} <= 3'b111;
    else        {spybr1_n, sysmbr1_n, cpsmbr1_n} <= {spybr_n, sysmbr_n, cpsmbr_n};

  always_ff @(negedge mlclk or negedge por_n)
    if (!por_n) mlcsmbr1_n <= 1'b1;
    else        mlcsmbr1_n <= mlcsmbr_n;
endmodule
