// tb_lapd_interface -- end-to-end test of the LAPD interface at its default
// sizes (512 KB Common Shared Array, 64 KB LAPD EEPROM).
//
// The testbench plays the four bus masters -- the MC68020 HOST, the T7130
// MLC, the T7115A SPYDER-T and an EX_CPU -- plus the interrupt controller
// handshakes, and drives them through everything the interface does:
// shared-memory reads and writes from every master (checked against one
// scoreboard, so data written by one master is read back by another),
// simultaneous requests from all masters, pre-emption of the MLC (state S6),
// wait states for the HOST program EEPROM and the LAPD EEPROM, write
// protection and the resulting Interrupt Status Register flags, the
// SPYDER-T illegal-address interrupt, bus-error time-outs for the HOST and
// the MLC, the control registers CR0/CR1 with the SPYDER-T attention pulse,
// the interrupt request register in both directions, the 10 ms timer
// interrupt, the interrupt priority encoder and the three HOST reset
// sources.  Each mechanism is counted; one that never happened is a
// failure.  Clock frequencies are the interface's: 66.66 MHz and 40 MHz
// oscillators, 4 MHz MFPCLK; BFRM is run at 1 MHz.
module tb_lapd_interface;
  import lapd_pkg::*;

  // ---- clocks ----
  logic osc66 = 0, osc40 = 0, mfpclk = 0, bfrm = 0, timer = 0, prst_n = 1;
  always #7.5 osc66 = !osc66;
  always #12.5 osc40 = !osc40;
  always #125 mfpclk = !mfpclk;
  always #500 bfrm = !bfrm;

  // ---- DUT signals ----
  logic cpclk, spyclk, hificlk, mlclk;
  logic [24:0] mpab = 0;
  logic [31:0] cpdb_w = 0, cpdb_r;
  logic cp_as_n = 1, cp_ds_n = 1, cp_rw_n = 1, cpiack_n = 1, cphoren_h = 0, gprst_h = 0;
  logic [1:0] cp_siz = 2'b10, cp_dsack_n, intal = 0;
  logic [2:0] cp_fc = 3'b101, cp_ipl_n;
  logic cp_berr_n, cp_rst_h, cp_hlt_h, cphor_h;
  logic [3:0] pdcs_n, eecs_n;
  logic cppdw_n, cpeew_n, cpmemr_n, gpitsel_n;
  logic mfpcs_n, bimcs_n, hifics_n, uartcs_n, hifr_n, hifw_n, gpstat_n, cpdben_n;
  logic mfpdk0_n = 1, bdk0_n = 1, udk0_n = 1, biackin_n = 1, intae_n = 1;
  logic [7:1] birq_n = '1;
  logic biack_n, mfpie_n, wrtv_n, spyia_n, tmrirq_n, mfprst_n, bimrst_n, hifirst_h;
  logic [23:1] mlca = 0, spya = 0;
  logic [15:0] mlc_dw = 0, spy_dw = 0, sys_dw = 0;
  logic mlcas_n = 1, mlcsmbr_n = 1;
  logic [3:0] mlc_s_n = '1, sys_s_n = '1;
  logic mlcsmbg_n, mlcdtack_n, mlcberr_n, mlcirq_n, mlcrst_n;
  logic spyas_n = 1, spywe_n = 1, spyrd_n = 1, spybr_n = 1, spyint0_n = 1;
  logic spybg_n, spyillegal_n, spysa, spyrst_h;
  logic [18:1] sys_a = 0;
  logic sbas_n = 1, sysmbr_n = 1, sys_wr_ctl = 0, sys_wr_vec = 0, sys_wr_int = 0, sysiack_n = 1;
  logic [7:0] sys_wdata = 0, sys_ctl;
  logic sysmbg_n, sysmdbg_n, cpuirq_n, hostint_n;
  logic [31:0] sys_vec_stat;
  logic [18:1] smab;
  logic [15:0] smdb_r;
  logic smucs_n, smlcs_n, ldecs_n;
  arb_state_e arb_state;

  lapd_interface dut (.*);

  // ---- checking and mechanism counters ----
  int checks = 0, failures = 0;
  typedef enum int {
    M_HOST_CSA, M_MLC_CSA, M_SPY_CSA, M_SYS_CSA, M_CROSS_READ, M_CONTENTION, M_MLC_PREEMPT,
    M_HOST_EE_WAIT, M_LDEE_WAIT_HOST, M_LDEE_WAIT_MLC, M_LDEE_WRITE, M_PD_SRAM, M_WRITE_VIOL,
    M_ISR_CLEAR, M_SPY_ILLEGAL, M_HOST_BERR, M_MLC_BERR, M_CR0_RESETS, M_SA_PULSE,
    M_IRR_TO_SYS, M_IRR_TO_MLC, M_SYS_TO_HOST, M_TIMER_IRQ, M_IPL, M_HOST_RST_SYS,
    M_HOST_RST_GPIT, M_PERIPH_WAIT, M_COUNT
  } mech_e;
  int mech[M_COUNT];

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // scoreboard of the shared memory: key = {device, half, word address}
  logic [15:0] csa_model [int];
  logic [15:0] ee_model [int];

  // ---- HOST (MC68020) bus cycle ----
  // returns 0 for a DSACK termination, 1 for a bus error; lat = time to it
  task automatic host_cycle(input logic [24:0] a, input logic rd, input logic [1:0] siz,
                            input logic [31:0] wd, output logic [31:0] rdat,
                            output logic berr, output realtime lat);
    realtime t0;
    @(posedge cpclk);
    mpab = a; cp_rw_n = rd; cp_siz = siz; cpdb_w = wd;
    #3 cp_as_n = 0; cp_ds_n = 0;
    t0 = $realtime;
    fork
      begin : wait_term
        wait (cp_dsack_n != 2'b11 || !cp_berr_n);
      end
      begin : limit
        #40000;
      end
    join_any
    disable fork;
    lat = $realtime - t0;
    berr = !cp_berr_n;
    #2 rdat = cpdb_r;
    check("host cycle terminated", cp_dsack_n != 2'b11 || !cp_berr_n);
    @(posedge cpclk);
    cp_as_n = 1; cp_ds_n = 1;
    #20;
  endtask

  task automatic host_write(input logic [24:0] a, input logic [31:0] wd, input logic [1:0] siz = 2'b10);
    logic [31:0] r; logic b; realtime l;
    host_cycle(a, 0, siz, wd, r, b, l);
    check("host write acknowledged", !b);
  endtask

  task automatic host_read(input logic [24:0] a, output logic [31:0] r, input logic [1:0] siz = 2'b10);
    logic b; realtime l;
    host_cycle(a, 1, siz, 0, r, b, l);
    check("host read acknowledged", !b);
  endtask

  // register access in peripheral space: data on D31..24, byte size
  task automatic reg_write(input logic [7:0] r, input logic [7:0] d);
    host_write(25'h300000 | 25'(r), {d, 24'h0}, 2'b01);
  endtask
  task automatic reg_read(input logic [7:0] r, output logic [7:0] d);
    logic [31:0] w;
    host_read(25'h300000 | 25'(r), w, 2'b01);
    d = w[31:24];
  endtask

  // CSA word at SMA word address wa (wa[17] = upper half)
  function automatic logic [24:0] host_csa(logic [17:0] wa);
    return 25'h780000 | 25'({wa, 1'b0});
  endfunction

  // ---- T7130 MLC ----
  task automatic mlc_cycle(input logic [23:1] a, input logic rd, input logic [15:0] wd,
                           output logic [15:0] rdat, output logic berr, output realtime lat,
                           input logic need_bus = 1);
    realtime t0;
    if (need_bus) begin
      @(posedge mlclk) mlcsmbr_n = 0;
      wait (!mlcsmbg_n);
    end
    @(posedge osc40);
    #2 mlca = a; mlc_dw = wd;
    #5 mlcas_n = 0; mlc_s_n = rd ? 4'b1100 : 4'b0011;
    t0 = $realtime;
    fork
      begin : w
        wait (!mlcdtack_n || !mlcberr_n);
      end
      begin : l
        #20000;
      end
    join_any
    disable fork;
    lat = $realtime - t0;
    berr = !mlcberr_n;
    #2 rdat = smdb_r;
    check("mlc cycle terminated", !mlcdtack_n || !mlcberr_n);
    #10 mlcas_n = 1; mlc_s_n = '1;
    #10 mlcsmbr_n = 1;
    // grant gone (arbiter out of S4/S5/S6) before the next request
    wait (mlcsmbg_n && !(arb_state inside {ARB_MLC1, ARB_MLC2, ARB_MREL}));
    #30;
  endtask

  // ---- T7115A SPYDER-T: one word transfer per grant ----
  task automatic spy_cycle(input logic [23:1] a, input logic rd, input logic [15:0] wd,
                           output logic [15:0] rdat);
    @(posedge spyclk) spybr_n = 0;
    wait (!spybg_n);
    #5 spya = a; spy_dw = wd;
    #5 spyas_n = 0;
    if (rd) spyrd_n = 0; else spywe_n = 0;
    #80 rdat = smdb_r;
    spyrd_n = 1; spywe_n = 1;
    #5 spyas_n = 1;
    #10 spybr_n = 1;
    wait (spybg_n);
    #30;
  endtask

  // ---- EX_CPU ----
  task automatic sys_cycle(input logic [18:1] a, input logic rd, input logic [15:0] wd,
                           output logic [15:0] rdat);
    sysmbr_n = 0;
    wait (!sysmbg_n);
    #5 sys_a = a; sys_dw = wd;
    #5 sbas_n = 0; sys_s_n = rd ? 4'b1100 : 4'b0011;
    #80 rdat = smdb_r;
    sys_s_n = '1; sbas_n = 1;
    #10 sysmbr_n = 1;
    wait (sysmbg_n);
    #30;
  endtask

  task automatic sys_write_reg(input int which, input logic [7:0] d);
    #10 sys_wdata = d;
    #5 case (which)
      0: sys_wr_ctl = 1;
      1: sys_wr_vec = 1;
      default: sys_wr_int = 1;
    endcase
    #20 {sys_wr_ctl, sys_wr_vec, sys_wr_int} = '0;
    #10;
  endtask

  // ---- one shared-memory access by master m (0 HOST, 1 MLC, 2 SPY, 3 SYS) ----
  task automatic sma_access(input int m, input logic [17:0] wa, input logic rd, input logic [15:0] wd);
    logic [15:0] r;
    logic [31:0] r32;
    logic b;
    realtime l;
    case (m)
      0: if (rd) begin host_read(host_csa(wa), r32); r = r32[31:16]; end
         else host_write(host_csa(wa), {wd, 16'h0});
      1: begin
        mlc_cycle(23'({5'b11111, wa}), rd, wd, r, b, l);
        check("mlc csa no bus error", !b);
        check($sformatf("mlc csa no wait states (%0t)", l), l < 5);
      end
      2: spy_cycle(23'({5'b11111, wa}), rd, wd, r);
      default: sys_cycle(18'(wa), rd, wd, r);
    endcase
    if (rd) begin
      if (csa_model.exists(int'(wa))) begin
        check("csa data", r == csa_model[int'(wa)]);
      end
    end else begin
      csa_model[int'(wa)] = wd;
    end
  endtask

  // ---- monitors ----
  int sa_pulses = 0, mlcirq_pulses = 0;
  logic saw_mrel = 0;
  always @(posedge spysa) sa_pulses++;
  always @(negedge mlcirq_n) mlcirq_pulses++;
  always @(posedge osc40) if (arb_state == ARB_MREL) saw_mrel = 1;
  // grants agree with the arbiter state, so at most one master owns the bus
  // (the MLC grant is registered on the falling edge: look just after it)
  always @(negedge osc40) if (prst_n) begin
    #1;
    check("SPYDER-T grant only in S1", !spybg_n == (arb_state == ARB_SPY));
    check("EX_CPU grant only in S2", !sysmbg_n == (arb_state == ARB_SYS));
    check("MLC bus grant only in S4/S5", !mlcsmbg_n == (arb_state inside {ARB_MLC1, ARB_MLC2}));
  end

  initial begin
    logic [31:0] r32;
    logic [15:0] r16;
    logic [7:0] r8;
    logic b;
    realtime l;

    // ---- power-on reset ----
    #1 prst_n = 0;
    #3000 check("power-on holds HOST in reset", cp_rst_h);
    check("arbiter idle after power-on", arb_state == ARB_IDLE && spybg_n && sysmbg_n && mlcsmbg_n);
    prst_n = 1;
    wait (!cp_rst_h);
    #100;
    check("peripherals held in reset by CR0", !mfprst_n && !bimrst_n && !mlcrst_n && spyrst_h && hifirst_h);

    // ---- control registers ----
    reg_write(REG_CR0, 8'hFD);            // release resets, D24 = 1: no SA
    check("CR0 releases resets", mfprst_n && bimrst_n && mlcrst_n && !spyrst_h && !hifirst_h);
    reg_read(REG_CR0, r8);
    check("CR0 read back", r8 == 8'hDC);
    mech[M_CR0_RESETS]++;
    reg_write(REG_CR0, 8'hFC);            // D24 = 0: SA pulse
    check("SA pulse", sa_pulses == 1);
    if (sa_pulses == 1) mech[M_SA_PULSE]++;
    reg_write(REG_CR0, 8'h7D);            // MFP reset on again
    check("MFP reset by CR0", !mfprst_n && bimrst_n);
    reg_write(REG_CR0, 8'hFD);
    begin
      realtime t0;
      // register block acknowledge: one SPYCLK tap after PERIFCSL
      host_cycle(25'h300000 | 25'(REG_CR1), 1, 2'b01, 0, r32, b, l);
      check("CR1 reads zero after reset", r32[31:24] == 8'h00 && !b);
      check("register DSACK0 only", cp_dsack_n == 2'b11);
      check("peripheral wait states", l > 60);
      if (l > 60) mech[M_PERIPH_WAIT]++;
    end

    // ---- write protection ----
    host_cycle(25'h200010, 0, 2'b10, 32'h1234_0000, r32, b, l);   // LAPD EEPROM, protected
    check("protected LAPD EEPROM write acknowledged", !b);
    host_cycle(25'h000100, 0, 2'b10, 32'h5555_0000, r32, b, l);   // program EEPROM, protected
    check("protected program EEPROM write acknowledged", !b);
    check($sformatf("program EEPROM: 4th SPYCLK edge (%0t)", l), l >= 3 * 60 && l <= 4 * 60 + 1);
    if (l >= 180) mech[M_HOST_EE_WAIT]++;
    host_cycle(25'h100200, 0, 2'b00, 32'hDEAD_BEEF, r32, b, l);   // program SRAM, protected
    check("protected SRAM write: no write strobe", cppdw_n);
    check("write violation interrupt", !wrtv_n);
    reg_read(REG_ISR, r8);
    check("ISR shows all three violations", r8 == 8'hE0);
    if (r8 == 8'hE0) mech[M_WRITE_VIOL]++;
    reg_write(REG_ISR, 8'h00);
    reg_read(REG_ISR, r8);
    check("ISR cleared", r8 == 8'h00 && wrtv_n);
    if (r8 == 8'h00 && wrtv_n) mech[M_ISR_CLEAR]++;

    // ---- enable writes, program the LAPD EEPROM, let the MLC read it ----
    reg_write(REG_CR1, 8'hE0);
    reg_read(REG_CR1, r8);
    check("CR1 read back", r8 == 8'hE0);
    for (int i = 0; i < 8; i++) begin
      logic [14:0] ea;
      logic [15:0] d;
      ea = 15'($urandom);
      d = 16'($urandom);
      host_cycle(25'h200000 | 25'({ea, 1'b0}), 0, 2'b10, {d, 16'h0}, r32, b, l);
      check("LAPD EEPROM write", !b && wrtv_n);
      ee_model[int'(ea)] = d;
      mech[M_LDEE_WRITE]++;
      host_cycle(25'h200000 | 25'({ea, 1'b0}), 1, 2'b10, 0, r32, b, l);
      check("HOST reads LAPD EEPROM", r32[31:16] == d);
      check($sformatf("HOST LAPD EEPROM wait (%0t)", l), l >= 2 * 60);
      if (l >= 120) mech[M_LDEE_WAIT_HOST]++;
      mlc_cycle(23'h100000 | 23'(ea), 1, 0, r16, b, l);     // MLCA23..20 = 0010
      check("MLC reads LAPD EEPROM", r16 == d && !b);
      check("MLC EEPROM DTACK after >= 250 ns", l >= 250 && l <= 560);
      if (l >= 250) mech[M_LDEE_WAIT_MLC]++;
    end
    host_cycle(25'h100200, 0, 2'b00, 32'hDEAD_BEEF, r32, b, l);   // program SRAM, now enabled
    check("enabled program SRAM write", wrtv_n && !b);
    host_cycle(25'h140004, 1, 2'b00, 0, r32, b, l);
    check($sformatf("data SRAM: zero-wait DSACK (%0t)", l), l < 5 && !b);
    if (l < 5) mech[M_PD_SRAM]++;

    // ---- every master on the shared memory, one after another ----
    for (int i = 0; i < 200; i++) begin
      int m;
      logic [17:0] wa;
      m = $urandom % 4;
      wa = {1'($urandom), 12'h0, 5'($urandom % 24)};
      if (csa_model.exists(int'(wa)) && ($urandom % 2) == 1) begin
        sma_access(m, wa, 1, 0);
        mech[M_CROSS_READ]++;
      end else sma_access(m, wa, 0, 16'($urandom));
      mech[M_HOST_CSA + m]++;
    end

    // ---- all masters at once ----
    for (int i = 0; i < 40; i++) begin
      logic [17:0] base;
      base = {1'($urandom), 12'h800, 5'h0};
      fork
        begin logic [15:0] d; d = 16'($urandom); sma_access(0, base | 18'd0, 0, d); sma_access(0, base | 18'd0, 1, 0); end
        begin logic [15:0] d; d = 16'($urandom); sma_access(1, base | 18'd1, 0, d); sma_access(1, base | 18'd1, 1, 0); end
        begin logic [15:0] d; d = 16'($urandom); sma_access(2, base | 18'd2, 0, d); sma_access(2, base | 18'd2, 1, 0); end
        begin logic [15:0] d; d = 16'($urandom); sma_access(3, base | 18'd3, 0, d); sma_access(3, base | 18'd3, 1, 0); end
      join
      mech[M_CONTENTION]++;
    end
    // priority: simultaneous SPYDER-T, EX_CPU and MLC requests from idle
    wait (arb_state == ARB_IDLE);
    @(posedge osc40);
    #3 spybr_n = 0; sysmbr_n = 0;
    @(negedge mlclk) mlcsmbr_n = 0;
    wait (!spybg_n || !sysmbg_n || !mlcsmbg_n);
    check("SPYDER-T wins", !spybg_n && sysmbg_n && mlcsmbg_n);
    #40 spybr_n = 1;
    wait (spybg_n);
    wait (!sysmbg_n || !mlcsmbg_n);
    check("then EX_CPU", !sysmbg_n && mlcsmbg_n);
    #40 sysmbr_n = 1;
    wait (!mlcsmbg_n);
    check("then MLC", sysmbg_n && spybg_n);
    // pre-emption: another request while the MLC holds the bus
    saw_mrel = 0;
    repeat (4) @(posedge osc40);
    #3 cpdb_w = 0;
    sysmbr_n = 0;
    wait (sysmbg_n == 0 || saw_mrel);
    repeat (4) @(posedge osc40);
    check("MLC pre-empted: S6 reached", saw_mrel && arb_state == ARB_MREL);
    check("EX_CPU waits until MLC releases", sysmbg_n);
    mlcsmbr_n = 1;
    wait (!sysmbg_n);
    check("EX_CPU granted after S6", mlcsmbg_n);
    if (saw_mrel) mech[M_MLC_PREEMPT]++;
    #40 sysmbr_n = 1;
    #200;

    // ---- SPYDER-T outside its space ----
    spy_cycle(23'h100000, 1, 0, r16);
    check("illegal address interrupt", !spyia_n);
    if (!spyia_n) mech[M_SPY_ILLEGAL]++;
    spy_cycle(23'h000800, 1, 0, r16);
    check("second illegal cycle", !spyia_n);
    cpiack_n = 0; #20 intal = 2'b10; intae_n = 0;
    #20 check("BIM CH2 acknowledge clears it", spyia_n);
    intae_n = 1; cpiack_n = 1;
    spy_cycle(23'h7C0010, 1, 0, r16);
    check("legal address: no interrupt", spyia_n);

    // ---- bus errors ----
    host_cycle(25'h500000, 1, 2'b10, 0, r32, b, l);
    check("HOST bus error", b);
    check("HOST BET time-out of 255 SPYCLK", l >= 254 * 60 && l <= 257 * 60);
    if (b) mech[M_HOST_BERR]++;
    mlc_cycle(23'h080000, 1, 0, r16, b, l, 0);
    check("MLC bus error", b);
    check("MLC BET time-out of 128 MLC clocks", l >= 127 * 50 && l <= 129 * 50);
    if (b) mech[M_MLC_BERR]++;

    // ---- interrupts ----
    sys_write_reg(0, 8'h20);                                  // HOST INTEN
    check("System Control written", sys_ctl == 8'h20);
    host_write(25'h300000 | 25'(REG_IRR), 32'h3FFF_FFFF, 2'b01);  // D31 = 0, D30 = 0
    check("HOST -> EX_CPU interrupt", !cpuirq_n);
    check("HOST -> MLC interrupt pulse", mlcirq_pulses > 0);
    if (mlcirq_pulses > 0) mech[M_IRR_TO_MLC]++;
    reg_read(REG_IRR, r8);
    check("IRR bit 31 pending", !r8[7]);
    sysiack_n = 0; #20 sysiack_n = 1;
    #10 check("EX_CPU acknowledge clears it", cpuirq_n);
    if (cpuirq_n) mech[M_IRR_TO_SYS]++;
    sys_write_reg(2, 8'h80);
    check("EX_CPU -> HOST interrupt", !hostint_n);
    sys_write_reg(2, 8'h00);
    check("EX_CPU -> HOST interrupt removed", hostint_n);
    if (hostint_n) mech[M_SYS_TO_HOST]++;
    sys_write_reg(1, 8'h4C);
    check("vector register", sys_vec_stat[7:0] == 8'h4C);
    timer = 1; #100 timer = 0;
    check("10 ms timer request", !tmrirq_n);
    intal = 2'b01; intae_n = 0;
    #20 check("BIM CH1 acknowledge clears timer", tmrirq_n);
    if (tmrirq_n) mech[M_TIMER_IRQ]++;
    intae_n = 1;
    for (int i = 0; i < 50; i++) begin
      int top;
      birq_n = 7'($urandom);
      #5 top = 0;
      for (int k = 1; k <= 7; k++) if (!birq_n[k]) top = k;
      check("HOST interrupt level", cp_ipl_n == ~3'(top));
      if (top > 0) mech[M_IPL]++;
    end
    birq_n = '1;

    // ---- HOST resets ----
    sys_write_reg(0, 8'hA0);                                  // HOST RST
    check("System Control resets the HOST", cp_rst_h);
    wait (!cp_rst_h);
    check("HOST RST self-cleared", sys_ctl == 8'h00);
    check("interface reset cleared CR0/CR1", !mlcrst_n && !mfprst_n);
    mech[M_HOST_RST_SYS]++;
    #3000;
    gprst_h = 1; #50 gprst_h = 0;
    check("GPIT reset", cp_rst_h);
    wait (!cp_rst_h);
    mech[M_HOST_RST_GPIT]++;
    #2000;

    for (int k = 0; k < M_COUNT; k++) begin
      mech_e e;
      e = mech_e'(k);
      $display("mechanism %-18s %0d", e.name(), mech[k]);
      check($sformatf("mechanism %s happened", e.name()), mech[k] > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
