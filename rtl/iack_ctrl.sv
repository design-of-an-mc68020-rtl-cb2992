// iack_ctrl -- HOST interrupt-acknowledge steering, HIFI-64 strobes and the
// 10 ms timer interrupt flip-flop.
//
// During a HOST interrupt acknowledge the BIM puts out which of its channels
// is being acknowledged on INTAL1:INTAL0 with INTAEL.  Channel 0 enables the
// MFP's own acknowledge (MFPIEL, the MFP supplies its vector), channel 1
// clears the 10 ms timer request and channel 2 clears the SPYDER-T illegal
// address latch.  The BIM acknowledge input BIACKL follows the HOST
// acknowledge and is also held while the BIM is in reset.  The HIFI-64 read
// and write strobes are its chip select with the data strobe and direction.
// The timer request is a flip-flop set by the rising edge of the external
// TIMER tick and cleared by the channel 1 acknowledge; it is the BIM channel
// 1 request.  Decodes follow the interface's acknowledge device and the
// timer flip-flop of its interrupt sheet.  Signals active low.
module iack_ctrl (
  input  logic       rst_n,
  input  logic       cpiack_n,   // HOST interrupt acknowledge cycle
  input  logic       bimrst_n,
  input  logic       intae_n,    // BIM acknowledge enable out
  input  logic [1:0] intal,      // INTAL1, INTAL0
  input  logic       hifics_n,   // HIFI-64 select
  input  logic       cpds_n,
  input  logic       cprw_n,
  input  logic       timer,      // 10 ms tick
  output logic       biack_n,
  output logic       mfpie_n,
  output logic       clrtm1_n,
  output logic       clrspia_n,
  output logic       hifr_n,
  output logic       hifw_n,
  output logic       tmrirq_n    // BIM CH1 request
);
  assign biack_n   = !(!cpiack_n || !bimrst_n);
  assign mfpie_n   = !(!intae_n && intal == 2'b00);
  assign clrtm1_n  = !(!intae_n && intal == 2'b01);
  assign clrspia_n = !(!intae_n && intal == 2'b10);
  assign hifr_n    = !(!hifics_n && cprw_n && !cpds_n);
  assign hifw_n    = !(!hifics_n && !cprw_n && !cpds_n);

  logic tm_clr;
  assign tm_clr = !clrtm1_n || !rst_n;

  always_ff @(posedge timer or posedge tm_clr)
    if (tm_clr) tmrirq_n <= 1'b1;
    else                     tmrirq_n <= 1'b0;
endmodule
