// host_sma_strobes -- HOST byte strobes into the Shared Memory Array.
//
// Combinational.  The SMA is a 16-bit memory with an even (D15..8, A0 = 0)
// and an odd (D7..0) byte.  While the HOST holds the SMA grant and its
// address and data strobes are active, a read in CSA or LAPD EEPROM space, or
// a write in CSA space, drives the even strobe when A0 = 0 and the odd strobe
// when the cycle reaches the odd byte: A0 = 1, or a word, three-byte or long
// transfer (SIZ0 = 0 or SIZ1 = 1) starting at an even address.  Writes also
// need the delayed grant CPSM2DBGL so that no write strobe is issued in the
// clock the bus changes owner.  Terms follow the HOST SMA strobe device of
// the interface; all signals are active low.
module host_sma_strobes (
  input  logic cpsmbg_n,    // HOST SMA grant
  input  logic cpsm2dbg_n,  // HOST SMA grant, delayed
  input  logic cldsms_n,    // CSA space
  input  logic cldesp_n,    // LAPD EEPROM space
  input  logic cp0rw_n,     // 1 read, 0 write
  input  logic cp0as_n,
  input  logic cp0ds_n,
  input  logic mpab0,
  input  logic [1:0] mpsize, // SIZ1, SIZ0
  output logic smwe_n,
  output logic smwo_n,
  output logic smre_n,
  output logic smro_n
);
  logic cyc, rd, wt, odd;

  assign cyc = !cpsmbg_n && !cp0ds_n && !cp0as_n;
  assign rd  = cyc && (!cldsms_n || !cldesp_n) && cp0rw_n;
  assign wt  = cyc && !cldsms_n && !cp0rw_n && !cpsm2dbg_n;
  assign odd = mpab0 || !mpsize[0] || mpsize[1];

  assign smwe_n = !(wt && !mpab0);
  assign smwo_n = !(wt && odd);
  assign smre_n = !(rd && !mpab0);
  assign smro_n = !(rd && odd);
endmodule
