// lapd_interface -- glue logic of an MC68020-based LAPD interface board with
// a four-master shared memory.
//
// The board lets four bus masters share one 16-bit Shared Memory Array
// (512 KB SRAM plus 64 KB LAPD protocol EEPROM): the SPYDER-T T7115A
// (priority 1), an external system CPU EX_CPU (2), the HOST MC68020 (3) and
// the T7130 Multichannel LAPD Controller (4).  Around the arbiter sit the
// HOST's address decode, byte strobes, wait-state and DSACK generation,
// write protection with violation interrupts, control/status registers,
// interrupt steering, reset control, bus error timers and clock dividers.
// The processors, the HDLC controller, the BIM and MFP interrupt chips and
// the HOST's private memories are outside this module: their pins are ports.
//
// Data flow of one shared-memory access: a master raises its request; the
// request is synchronised (smbr_sync), the arbiter (arb_fsm) grants it, the
// grant selects that master's address, data and strobes onto the SMA bus
// (sma_bus_mux), sma_chip_select turns the address and grant into SRAM or
// EEPROM chip selects, and sma_memory answers.  The HOST sees its cycle end
// through DSACK1 (host_dsack), the MLC through DTACK (mlc_dtack); a cycle
// that is never acknowledged ends in a bus error (bus_error_timer).
//
// Timing: the arbiter runs on the 40 MHz oscillator, MLC requests are
// sampled on the falling edge of its 20 MHz clock, HOST wait states count
// SPYCLK (66.66 MHz / 4).  All active-low pins end in _n.  The block
// partitioning follows the programmable devices and sheets of the interface;
// the bus multiplexer replacing tri-state buses, and the derivation of the
// internal reset from the HOST reset line, are this design's choices.
module lapd_interface
  import lapd_pkg::*;
(
  // clocks and reset
  input  logic        osc66,        // 66.66 MHz
  input  logic        osc40,        // 40 MHz (ARBCLK)
  input  logic        mfpclk,       // 4 MHz
  input  logic        bfrm,         // clock of the reset synchronisers
  input  logic        timer,        // 10 ms tick
  input  logic        prst_n,       // power-on reset
  output logic        cpclk,        // HOST clock
  output logic        spyclk,       // SPYDER-T clock
  output logic        hificlk,      // HIFI-64 clock
  output logic        mlclk,        // MLC clock
  // HOST (MC68020) bus
  input  logic [24:0] mpab,         // A24..A0
  input  logic [31:0] cpdb_w,       // data written by the HOST
  output logic [31:0] cpdb_r,       // data returned to the HOST
  input  logic        cp_as_n,
  input  logic        cp_ds_n,
  input  logic        cp_rw_n,
  input  logic [1:0]  cp_siz,       // SIZ1, SIZ0
  input  logic [2:0]  cp_fc,
  input  logic        cpiack_n,     // interrupt acknowledge cycle
  output logic [1:0]  cp_dsack_n,   // DSACK1, DSACK0
  output logic        cp_berr_n,
  output logic [2:0]  cp_ipl_n,
  output logic        cp_rst_h,
  output logic        cp_hlt_h,
  output logic        cphor_h,
  input  logic        cphoren_h,
  // HOST private memory selects
  output logic [3:0]  pdcs_n,       // program/data SRAM UU, UM, LM, LL
  output logic        cppdw_n,      // program/data SRAM write
  output logic [3:0]  eecs_n,       // EEPROM {UE, LE, UO, LO}
  output logic        cpeew_n,      // program EEPROM write
  output logic        cpmemr_n,
  output logic        gpitsel_n,
  input  logic        gprst_h,
  // HOST peripherals: BIM, MFP, HIFI-64, UART
  output logic        mfpcs_n,
  output logic        bimcs_n,
  output logic        hifics_n,
  output logic        uartcs_n,
  output logic        hifr_n,
  output logic        hifw_n,
  output logic        gpstat_n,
  output logic        cpdben_n,
  input  logic        mfpdk0_n,
  input  logic        bdk0_n,
  input  logic        udk0_n,
  input  logic        biackin_n,
  input  logic        intae_n,
  input  logic [1:0]  intal,
  input  logic [7:1]  birq_n,       // BIM interrupt outputs
  output logic        biack_n,
  output logic        mfpie_n,
  output logic        wrtv_n,       // BIM CH3: write violation
  output logic        spyia_n,      // BIM CH2: SPYDER-T illegal address
  output logic        tmrirq_n,     // BIM CH1: 10 ms timer
  output logic        mfprst_n,
  output logic        bimrst_n,
  output logic        hifirst_h,
  // T7130 MLC
  input  logic [23:1] mlca,
  input  logic [15:0] mlc_dw,
  input  logic        mlcas_n,
  input  logic [3:0]  mlc_s_n,      // EWE, OWE, ERE, ORE
  input  logic        mlcsmbr_n,
  output logic        mlcsmbg_n,
  output logic        mlcdtack_n,
  output logic        mlcberr_n,
  output logic        mlcirq_n,
  output logic        mlcrst_n,
  // T7115A SPYDER-T
  input  logic [23:1] spya,
  input  logic [15:0] spy_dw,
  input  logic        spyas_n,
  input  logic        spywe_n,
  input  logic        spyrd_n,
  input  logic        spybr_n,
  input  logic        spyint0_n,
  output logic        spybg_n,
  output logic        spyillegal_n, // SPYDER-T outside SMA space (SPYSMSPL)
  output logic        spysa,
  output logic        spyrst_h,
  // EX_CPU
  input  logic [18:1] sys_a,
  input  logic [15:0] sys_dw,
  input  logic [3:0]  sys_s_n,      // strobes {we, wo, re, ro}
  input  logic        sbas_n,
  input  logic        sysmbr_n,
  output logic        sysmbg_n,
  output logic        sysmdbg_n,
  input  logic        sys_wr_ctl,
  input  logic        sys_wr_vec,
  input  logic        sys_wr_int,
  input  logic [7:0]  sys_wdata,
  input  logic        sysiack_n,
  output logic [7:0]  sys_ctl,
  output logic [31:0] sys_vec_stat,
  output logic        cpuirq_n,     // HOST -> EX_CPU interrupt
  output logic        hostint_n,    // EX_CPU -> HOST interrupt (MFP CH7)
  // Shared Memory Array bus, observed
  output logic [18:1] smab,
  output logic [15:0] smdb_r,       // read data to all masters
  output logic        smucs_n,
  output logic        smlcs_n,
  output logic        ldecs_n,
  output arb_state_e  arb_state
);
  // ---- clocks and resets ----
  logic perifclk, m20clk, por_n, rst_n, sycrgc_n, gprst1_n;
  logic cuprst_h, cuphlt_h, sirqen_h;

  assign por_n = prst_n;
  assign rst_n = !cp_rst_h;   // interface reset follows the HOST reset line

  clock_gen u_clk (.osc66, .osc40, .por_n, .cpclk, .spyclk, .perifclk, .m20clk, .hificlk);

  host_reset u_rst (.bfrm, .prst_n, .cuprst_h, .cuphlt_h, .cphoren_h, .gprst_h,
                    .cphor_h, .cprst_h(cp_rst_h), .cphlt_h(cp_hlt_h), .gprst1_n, .sycrgc_n);

  // ---- HOST decode ----
  logic cpsrwe_h, cpeewe_h, ldewe_h;
  logic cpsrpwv_n, cpeewv_n, cpsmbr_n, cldsms_n, cldesp_n, cpsmbe_n, cpdbse_n;
  logic cpsmbg_n, cpsm2dbg_n, cpsmdbg_n, cpsmbr1_n, cpdkrst_n;

  host_mem_decode u_dec (.cp0as_n(cp_as_n), .cp0ds_n(cp_ds_n), .cp0rw_n(cp_rw_n), .cpsrwe_h,
                         .cpeewe_h, .mpab24(mpab[24]), .mpab(mpab[22:18]), .cpsmbg_n,
                         .cppdw_n, .cpsrpwv_n, .cpeew_n, .cpeewv_n, .cpmemr_n, .cpsmbr_n,
                         .cldsms_n, .cldesp_n, .cpsmbe_n, .cpdbse_n);

  logic pd_dsack0_n, pd_dsack1_n, perifsel_n;
  host_pd_cs u_pd (.cp0as_n(cp_as_n), .mpab_hi(mpab[22:18]), .mpab_lo(mpab[1:0]), .mpsize(cp_siz),
                   .pdcs_n, .cpdsack0_n(pd_dsack0_n), .cpdsack1_n(pd_dsack1_n), .perifsel_n,
                   .gpitsel_n);

  logic cpees_n;
  host_ee_cs u_ee (.cp0as_n(cp_as_n), .mpab_hi(mpab[22:18]), .mpab17(mpab[17]), .mpab0(mpab[0]),
                   .mpsize(cp_siz), .cpsmbr1_n, .cpeuecs_n(eecs_n[3]), .cpelecs_n(eecs_n[2]),
                   .cpeuocs_n(eecs_n[1]), .cpelocs_n(eecs_n[0]), .cpees_n, .cpdkrst_n);

  logic cpds1_n, perifcs_n, cpuirs_n, cr0s_n, cr1s_n, irs_n, perifdk_n;
  periph_select u_per (.perifclk, .perifsel_n, .bimrst_n, .mpab(mpab[7:0]), .cp0as_n(cp_as_n),
                       .cp0ds_n(cp_ds_n), .cpds1_n, .perifcs_n, .mfpcs_n, .bimcs_n, .hifics_n,
                       .uartcs_n, .cpuirs_n, .cr0s_n, .cr1s_n, .irs_n, .gpstat_n, .perifdk_n);

  logic cr0rd_n, cr0ck_n, cr1rd_n, cr1ck_n, isrd_n, isrc_n;
  logic [7:0] cr0, cr1, cr_rdata;
  logic cr_rd_en;
  host_ctrl_regs u_cr (.rst_n, .cr0s_n, .cr1s_n, .irs_n, .cp0rw_n(cp_rw_n), .cp0ds_n(cp_ds_n),
                       .cpdb_hi(cpdb_w[31:24]), .cr0rd_n, .cr0ck_n, .cr1rd_n, .cr1ck_n, .isrd_n,
                       .isrc_n, .spysa, .cr0, .cr1, .mfprst_n, .bimrst_n, .hifirst_h, .mlcrst_n,
                       .spyrst_h, .cpeewe_h, .cpsrwe_h, .ldewe_h, .rdata(cr_rdata),
                       .rd_en(cr_rd_en));

  // ---- arbitration ----
  logic spybr1_n, sysmbr1_n, mlcsmbr1_n;
  logic s4_n, s5_n, s6_n, idle_n, mlcbg_n;

  smbr_sync u_sync (.arbclk(osc40), .mlclk, .por_n, .spybr_n, .sysmbr_n, .cpsmbr_n, .mlcsmbr_n,
                    .spybr1_n, .sysmbr1_n, .cpsmbr1_n, .mlcsmbr1_n);

  arb_fsm u_arb (.arbclk(osc40), .por_n, .spybr1_n, .sysmbr1_n, .cpsmbr1_n, .mlcsmbr1_n,
                 .spybg_n, .sysmbg_n, .cpsmbg_n, .s4_n, .s5_n, .s6_n, .idle_n, .mlclk,
                 .state(arb_state));

  mlc_grant u_grant (.arbclk(osc40), .por_n, .s4_n, .s5_n, .s6_n, .cpsmbg_n, .sysmbg_n,
                     .mlcsmbg_n, .mlcbg_n, .cpsm2dbg_n, .sysmdbg_n, .cpdkrst_n, .cpsmdbg_n);

  // ---- SMA strobes from each master ----
  logic [3:0] cp_s_n, spy_s_n;
  logic spysmsp_n, spysmcs_n;
  host_sma_strobes u_hs (.cpsmbg_n, .cpsm2dbg_n, .cldsms_n, .cldesp_n, .cp0rw_n(cp_rw_n),
                         .cp0as_n(cp_as_n), .cp0ds_n(cp_ds_n), .mpab0(mpab[0]), .mpsize(cp_siz),
                         .smwe_n(cp_s_n[3]), .smwo_n(cp_s_n[2]), .smre_n(cp_s_n[1]),
                         .smro_n(cp_s_n[0]));

  spy_sma_ctrl u_spy (.spybg_n, .spywe_n, .spyrd_n, .spyas_n, .spya(spya[23:19]),
                      .smwe_n(spy_s_n[3]), .smwo_n(spy_s_n[2]), .smre_n(spy_s_n[1]),
                      .smro_n(spy_s_n[0]), .spysmsp_n, .spysmcs_n);
  assign spyillegal_n = !(!spyas_n && !spybg_n && spysmsp_n);

  logic [15:0] smdb_w;
  logic smwe_n, smwo_n, smre_n, smro_n;
  sma_bus_mux u_mux (.spybg_n, .sysmbg_n, .cpsmbg_n, .mlcbg_n,
                     .spy_a(spya[18:1]), .spy_d(spy_dw), .spy_s_n,
                     .sys_a, .sys_d(sys_dw), .sys_s_n,
                     .cp_a(mpab[18:1]), .cp_d(cpdb_w[31:16]), .cp_s_n,
                     .mlc_a(mlca[18:1]), .mlc_d(mlc_dw), .mlc_s_n,
                     .smab, .smdb_w, .smwe_n, .smwo_n, .smre_n, .smro_n);

  logic ldewe_n, ldewo_n, ldeewv_n, mlceer_n;
  lapd_ee_strobes u_lde (.cpsmbg_n, .cpsm2dbg_n, .cldesp_n, .ldewe_h, .cp0rw_n(cp_rw_n),
                         .cp0as_n(cp_as_n), .cp0ds_n(cp_ds_n), .mpab0(mpab[0]), .mpsize(cp_siz),
                         .smro_n, .smre_n, .ldewe_n, .ldewo_n, .ldeewv_n, .mlceer_n);

  logic mlcesp_n, sram_dtack_n, mlcdtk1_n;
  sma_chip_select u_cs (.spybg_n, .sysmbg_n, .cpsmbg_n, .mlcbg_n, .mlca(mlca[23:19]), .mlcas_n,
                        .smab18(smab[18]), .spysmcs_n, .sbas_n, .cpsms_n(cldsms_n), .cldesp_n,
                        .mpab20(mpab[20]), .smucs_n, .smlcs_n, .ldecs_n, .mlcesp_n,
                        .mlcdtack_n(sram_dtack_n));

  logic [1:0] sma_rd_en;
  sma_memory u_mem (.smab(smab[17:1]), .wdata(smdb_w), .smucs_n, .smlcs_n, .ldecs_n, .smwe_n,
                    .smwo_n, .smre_n, .smro_n, .ldewe_n, .ldewo_n, .rdata(smdb_r),
                    .rd_en(sma_rd_en));

  // ---- acknowledges and bus errors ----
  mlc_dtack u_mdk (.mfpclk, .mlceer_n, .mlcesp_n, .sram_dtack_n, .mlcdtk1_n, .mlcdtack_n);

  logic resen0_n, dk0_n, dk1_n;
  logic [3:0] wtap;
  host_dsack u_dk (.spyclk, .cp0as_n(cp_as_n), .cpees_n, .cpsmdbg_n, .cldsms_n, .cldesp_n,
                   .cpuirs_n, .perifdk_n, .hifics_n, .mfpdk0_n, .bdk0_n, .udk0_n, .perifcs_n,
                   .biackin_n, .resen0_n, .w(wtap), .cpdsack0_n(dk0_n), .cpdsack1_n(dk1_n));
  assign cp_dsack_n = {dk1_n && pd_dsack1_n, dk0_n && pd_dsack0_n};

  logic [7:0] mlc_bet_cnt, cp_bet_cnt;
  bus_error_timer #(.TIMEOUT_CLKS(128)) u_mbet (.clk(m20clk), .as_n(mlcas_n), .ack_n(mlcdtack_n),
                                                .berr_n(mlcberr_n), .count(mlc_bet_cnt));
  bus_error_timer #(.TIMEOUT_CLKS(255)) u_cbet (.clk(spyclk), .as_n(cp_as_n),
                                                .ack_n(cp_dsack_n[0] && cp_dsack_n[1]),
                                                .berr_n(cp_berr_n), .count(cp_bet_cnt));

  // ---- interrupts ----
  logic [2:0] isr_flags;
  logic [7:0] isr_rdata;
  logic isr_rd_en, clrtm1_n, clrspia_n;
  isr_violation u_isr (.rst_n, .cpeewv_n, .cpsrpwv_n, .ldeewv_n, .isrd_n, .isrc_n, .spysmsp_n,
                       .spyas_n, .clrspia_n, .flags(isr_flags), .rdata(isr_rdata),
                       .rd_en(isr_rd_en), .wrtv_n, .spyia_n);

  iack_ctrl u_iack (.rst_n, .cpiack_n, .bimrst_n, .intae_n, .intal, .hifics_n, .cpds_n(cp_ds_n),
                    .cprw_n(cp_rw_n), .timer, .biack_n, .mfpie_n, .clrtm1_n, .clrspia_n, .hifr_n,
                    .hifw_n, .tmrirq_n);

  logic sirq_n, cp2db31, irr_rd_en;
  irq_ctrl u_irq (.rst_n, .cp0rw_n(cp_rw_n), .cp0ds_n(cp_ds_n), .cp0as_n(cp_as_n), .cpuirs_n,
                  .cpdb31(cpdb_w[31]), .cpdb30(cpdb_w[30]), .spyint0_n, .sirqen_h, .sysiack_n,
                  .cpiack_n, .cpdbse_n, .sirq_n, .cpuirq_n, .mlcirq_n, .cp2db31,
                  .rd_en(irr_rd_en), .cpdben_n);

  logic ipl_gs_n, ipl_eo_n;
  irq_prio_enc u_ipl (.ei_n(1'b0), .in_n({birq_n, 1'b1}), .a_n(cp_ipl_n), .gs_n(ipl_gs_n),
                      .eo_n(ipl_eo_n));

  sys_regs u_sys (.por_n, .sycrgc_n, .wr_ctl(sys_wr_ctl), .wr_vec(sys_wr_vec),
                  .wr_int(sys_wr_int), .wdata(sys_wdata), .cpfc(cp_fc), .cprst_h(cp_rst_h),
                  .ctl(sys_ctl), .vec_stat(sys_vec_stat), .cuprst_h, .cuphlt_h, .sirqen_h,
                  .hostint_n);

  // ---- HOST read data ----
  always_comb begin
    cpdb_r = '0;
    if (!cpsmbe_n)      cpdb_r[31:16] = smdb_r;
    else if (cr_rd_en)  cpdb_r[31:24] = cr_rdata;
    else if (isr_rd_en) cpdb_r[31:24] = isr_rdata;
    else if (irr_rd_en) cpdb_r[31]    = cp2db31;
  end
endmodule
