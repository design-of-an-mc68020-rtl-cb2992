// lapd_pkg -- shared types and constants of the LAPD interface glue logic.
//
// Holds the state encoding of the shared-memory arbiter, the HOST address map
// (address-line patterns that select each space), the byte offsets of the
// HOST-visible registers inside the peripheral space and their bit positions.
// The address patterns and register offsets are the ones the interface
// defines; the enum encoding of the arbiter is this design's own (the original
// state machine is one-hot with seven active-low state bits, see arb_fsm).
package lapd_pkg;

  // Arbiter states. ARB_VOID is the all-bits-clear condition that the
  // one-hot machine passes through when the MLC releases a pre-empted grant
  // with no other request pending; it returns to idle on the next clock.
  typedef enum logic [2:0] {
    ARB_IDLE = 3'd0,  // S0: no grant
    ARB_SPY  = 3'd1,  // S1: SPYDER-T owns the SMA (priority 1)
    ARB_SYS  = 3'd2,  // S2: EX_CPU owns the SMA   (priority 2)
    ARB_CP   = 3'd3,  // S3: HOST owns the SMA     (priority 3)
    ARB_MLC1 = 3'd4,  // S4: MLC grant, first clock (priority 4)
    ARB_MLC2 = 3'd5,  // S5: MLC grant, held
    ARB_MREL = 3'd6,  // S6: MLC pre-empted, waiting for it to release
    ARB_VOID = 3'd7   // no state bit set
  } arb_state_e;

  // HOST (MC68020) address map, decoded from MPAB22..MPAB18 (and MPAB24).
  localparam logic [4:0] HA_EE     = 5'b00000; // A22..18: program EEPROM  0x000000
  localparam logic [3:0] HA_PD     = 4'b0010;  // A22..19: program/data SRAM 0x100000
  localparam logic [4:0] HA_LDEE   = 5'b01000; // A22..18: LAPD EEPROM in SMA 0x200000
  localparam logic [2:0] HA_PERIF  = 3'b011;   // A22..20: peripherals 0x300000
  localparam logic [2:0] HA_GPIT   = 3'b100;   // A22..20: GPIT space 0x400000
  localparam logic [3:0] HA_CSA    = 4'b1111;  // A22..19: common shared SRAM 0xF80000 (A23 not decoded)

  // MLC (T7130) address map, decoded from MLCA23..MLCA19.
  localparam logic [4:0] MA_CSA    = 5'b11111; // 0xF80000-0xFFFFFF
  localparam logic [3:0] MA_LDEE   = 4'b0010;  // A23..20: 0x200000-0x20FFFF

  // SPYDER-T address map: SMA space is SPYA23..19 = 11111.
  localparam logic [4:0] SA_CSA    = 5'b11111;

  // Register offsets inside the peripheral space (HOST A7..A0).
  localparam logic [7:0] REG_IRR   = 8'hF0;
  localparam logic [7:0] REG_CR0   = 8'hF2;
  localparam logic [7:0] REG_CR1   = 8'hF4;
  localparam logic [7:0] REG_ISR   = 8'hF6;
  localparam logic [7:0] REG_GPST  = 8'hF8;
  // Peripheral device selects (HOST A7..A4).
  localparam logic [3:0] DEV_MFP   = 4'h0;
  localparam logic [3:0] DEV_BIM   = 4'h3;
  localparam logic [3:0] DEV_HIFI  = 4'h8;
  localparam logic [3:0] DEV_UART  = 4'hC;
  localparam logic [3:0] DEV_REGS  = 4'hF;

  // CR0 bit positions (within the upper data byte D31..D24).
  localparam int CR0_MFPRST  = 7; // D31
  localparam int CR0_BIMRST  = 6; // D30
  localparam int CR0_HIFIRST = 4; // D28
  localparam int CR0_MLCRST  = 3; // D27
  localparam int CR0_SPYRST  = 2; // D26
  localparam int CR0_SPYSA   = 0; // D24
  // CR1 bit positions.
  localparam int CR1_EEWEN_MP = 7; // D31
  localparam int CR1_SRWEN_MP = 6; // D30
  localparam int CR1_EEWEN_LD = 5; // D29

  // MC68020 SIZ1:SIZ0 encodings.
  localparam logic [1:0] SZ_LONG = 2'b00;
  localparam logic [1:0] SZ_BYTE = 2'b01;
  localparam logic [1:0] SZ_WORD = 2'b10;
  localparam logic [1:0] SZ_3B   = 2'b11;

endpackage
