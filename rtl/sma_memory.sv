// sma_memory -- the Shared Memory Array: Common Shared SRAM Array (CSA) and
// LAPD protocol EEPROM on one 16-bit bus.
//
// The CSA is four 128K x 8 static RAMs: an even byte (D15..8) and an odd byte
// (D7..0) device in an upper and a lower half selected by the chip selects
// SMUCSL and SMLCSL (SMAB18 decoded by sma_chip_select), giving 512 Kbytes.
// The EEPROM is two 32K x 8 devices (even and odd byte, 64 Kbytes) selected
// by LDECSL, written only through the HOST's LAPD EEPROM strobes.  Address
// lines SMAB17..1 (SMAB15..1 for the EEPROM) select the word.  Reads are
// asynchronous: a byte lane drives its half of the read bus while its chip
// select and output enable are active.  A write stores the data present when
// chip select and write enable first become active together (the masters
// set the data up with the address).  Sizes are parameters whose defaults
// are the interface's parts; the write timing is this design's model of the
// static RAM.
module sma_memory #(
  parameter int unsigned SRAM_AW = 17,   // word address bits per half (128K)
  parameter int unsigned EE_AW   = 15    // word address bits of the EEPROM (32K)
) (
  input  logic [17:1] smab,     // SMA address
  input  logic [15:0] wdata,    // SMA data bus, write
  input  logic        smucs_n,
  input  logic        smlcs_n,
  input  logic        ldecs_n,
  input  logic        smwe_n,   // even byte write (SRAM)
  input  logic        smwo_n,   // odd byte write (SRAM)
  input  logic        smre_n,   // even byte output enable
  input  logic        smro_n,   // odd byte output enable
  input  logic        ldewe_n,  // even byte write (EEPROM)
  input  logic        ldewo_n,  // odd byte write (EEPROM)
  output logic [15:0] rdata,    // SMA data bus, read
  output logic [1:0]  rd_en     // {even, odd} lane driven
);
  logic [7:0] ue [2**SRAM_AW];
  logic [7:0] uo [2**SRAM_AW];
  logic [7:0] le [2**SRAM_AW];
  logic [7:0] lo [2**SRAM_AW];
  logic [7:0] ee [2**EE_AW];
  logic [7:0] eo [2**EE_AW];

  logic [SRAM_AW-1:0] sa;
  logic [EE_AW-1:0]   ea;
  assign sa = smab[SRAM_AW:1];
  assign ea = smab[EE_AW:1];

  // Write enables of each device, active high: chip select and write strobe.
  logic w_ue, w_uo, w_le, w_lo, w_ee, w_eo;
  assign w_ue = !smucs_n && !smwe_n;
  assign w_uo = !smucs_n && !smwo_n;
  assign w_le = !smlcs_n && !smwe_n;
  assign w_lo = !smlcs_n && !smwo_n;
  assign w_ee = !ldecs_n && !ldewe_n;
  assign w_eo = !ldecs_n && !ldewo_n;

  always_ff @(posedge w_ue) ue[sa] <= wdata[15:8];
  always_ff @(posedge w_uo) uo[sa] <= wdata[7:0];
  always_ff @(posedge w_le) le[sa] <= wdata[15:8];
  always_ff @(posedge w_lo) lo[sa] <= wdata[7:0];
  always_ff @(posedge w_ee) ee[ea] <= wdata[15:8];
  always_ff @(posedge w_eo) eo[ea] <= wdata[7:0];

  always_comb begin
    rdata = '0;
    rd_en = '0;
    if (!smre_n) begin
      rd_en[1] = !smucs_n || !smlcs_n || !ldecs_n;
      if      (!smucs_n) rdata[15:8] = ue[sa];
      else if (!smlcs_n) rdata[15:8] = le[sa];
      else if (!ldecs_n) rdata[15:8] = ee[ea];
    end
    if (!smro_n) begin
      rd_en[0] = !smucs_n || !smlcs_n || !ldecs_n;
      if      (!smucs_n) rdata[7:0] = uo[sa];
      else if (!smlcs_n) rdata[7:0] = lo[sa];
      else if (!ldecs_n) rdata[7:0] = eo[ea];
    end
  end
endmodule
