// tb_sma_memory -- byte-lane writes and reads of the two CSA SRAM halves
// and the LAPD EEPROM at full size, against an associative-array model.
// Random addresses are drawn from a small pool so that locations are
// rewritten and read back often; all three devices and both byte lanes
// are exercised, and a read with no chip select must drive nothing.
// Each access sets address, data and strobes for 1 ns, then checks the
// read data.  The device sizes are the board's; the model is the testbench's
// own.
module tb_sma_memory;
  logic [17:1] smab = 0;
  logic [15:0] wdata = 0, rdata;
  logic smucs_n = 1, smlcs_n = 1, ldecs_n = 1, smwe_n = 1, smwo_n = 1, smre_n = 1, smro_n = 1;
  logic ldewe_n = 1, ldewo_n = 1;
  logic [1:0] rd_en;
  logic [7:0] model [int];
  logic [16:0] pool [32];
  int checks = 0, failures = 0;

  sma_memory dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // key: device (0 upper SRAM, 1 lower SRAM, 2 EEPROM), lane, word address
  function automatic int key(int dev, int lane, logic [16:0] a);
    return (dev << 20) | (lane << 18) | int'(dev == 2 ? 17'(a[14:0]) : a);
  endfunction

  task automatic select(int dev);
    smucs_n = dev != 0; smlcs_n = dev != 1; ldecs_n = dev != 2;
  endtask

  initial begin
    for (int i = 0; i < 32; i++) pool[i] = 17'($urandom);
    // initialise every pooled location in every device (memory starts random)
    for (int d = 0; d < 3; d++)
      for (int i = 0; i < 32; i++) begin
        select(d); smab = pool[i]; wdata = 16'($urandom);
        if (d == 2) {ldewe_n, ldewo_n} = 2'b00; else {smwe_n, smwo_n} = 2'b00;
        #1 {ldewe_n, ldewo_n, smwe_n, smwo_n} = '1;
        model[key(d, 1, pool[i])] = wdata[15:8];
        model[key(d, 0, pool[i])] = wdata[7:0];
        #1;
      end
    for (int i = 0; i < 20000; i++) begin
      int d;
      logic ev, od;
      d = $urandom % 3;
      select(d);
      smab = pool[$urandom % 32];
      wdata = 16'($urandom);
      ev = 1'($urandom); od = 1'($urandom) || !ev;
      if ($urandom % 2) begin
        if (d == 2) begin ldewe_n = !ev; ldewo_n = !od; end
        else begin smwe_n = !ev; smwo_n = !od; end
        #1 {ldewe_n, ldewo_n, smwe_n, smwo_n} = '1;
        if (ev) model[key(d, 1, smab)] = wdata[15:8];
        if (od) model[key(d, 0, smab)] = wdata[7:0];
      end else begin
        smre_n = !ev; smro_n = !od;
        #1;
        check("lanes driven", rd_en == {ev, od});
        if (ev) check("even byte", rdata[15:8] == model[key(d, 1, smab)]);
        if (od) check("odd byte", rdata[7:0] == model[key(d, 0, smab)]);
        {smre_n, smro_n} = '1;
      end
      #1;
    end
    select(3); smre_n = 0; smro_n = 0;
    #1 check("no select, no drive", rd_en == 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
