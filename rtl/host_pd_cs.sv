// host_pd_cs -- HOST program/data SRAM byte-lane selects, zero-wait DSACK and
// global space selects.
//
// Combinational.  The program/data SRAM (A22..19 = 0010) is a 32-bit port of
// four byte lanes UU (D31..24), UM, LM, LL (D7..0).  Which lanes a MC68020
// cycle touches follows from A1, A0 and the transfer size SIZ1:SIZ0 (01 byte,
// 10 word, 11 three bytes, 00 long): a cycle starting at byte offset
// k = {A1,A0} with n bytes still to move (n = 4 for long) uses lanes k up to
// min(3, k+n-1).  That rule is what is computed here, instead of a table of
// product terms; it gives the same selects as the interface's device for
// every address/size combination.  Both DSACK lines are asserted at once in
// this space with A20 set (zero wait states, 32-bit port).  PERIFSEL
// (A22..20 = 011) and GPITSEL (A22..20 = 100) are the global space selects.
// All outputs active low.
module host_pd_cs
  import lapd_pkg::*;
(
  input  logic       cp0as_n,
  input  logic [4:0] mpab_hi,    // MPAB22..MPAB18
  input  logic [1:0] mpab_lo,    // MPAB1, MPAB0
  input  logic [1:0] mpsize,     // SIZ1, SIZ0
  output logic [3:0] pdcs_n,     // [3] UU, [2] UM, [1] LM, [0] LL
  output logic       cpdsack0_n,
  output logic       cpdsack1_n,
  output logic       perifsel_n,
  output logic       gpitsel_n
);
  logic pdsp;
  logic [2:0] nbytes;
  logic [2:0] first, last;

  assign pdsp = !cp0as_n && (mpab_hi[4:1] == HA_PD);

  always_comb begin
    nbytes = (mpsize == SZ_LONG) ? 3'd4 : {1'b0, mpsize};
    first  = {1'b0, mpab_lo};
    last   = first + nbytes - 3'd1;
    if (last > 3'd3) last = 3'd3;
    for (int lane = 0; lane < 4; lane++)
      // lane index 0 is UU (offset 0) ... 3 is LL (offset 3)
      pdcs_n[3 - lane] = !(pdsp && (3'(lane) >= first) && (3'(lane) <= last));
  end

  assign cpdsack0_n = !(pdsp && mpab_hi[2]);
  assign cpdsack1_n = !(pdsp && mpab_hi[2]);
  assign perifsel_n = !(!cp0as_n && (mpab_hi[4:2] == HA_PERIF));
  assign gpitsel_n  = !(!cp0as_n && (mpab_hi[4:2] == HA_GPIT));
endmodule
