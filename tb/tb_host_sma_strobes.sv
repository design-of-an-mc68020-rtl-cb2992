// tb_host_sma_strobes -- for every combination of A0, size, direction,
// space and grants checks which SMA byte strobes the HOST drives.  The
// expected lanes come from the MC68020 word-port rule: the even byte is
// used when the cycle starts at an even address, the odd byte when it
// starts at an odd address or moves more than one byte.
// Combinational; outputs checked 1 ns after each vector.  The grant gating
// follows the interface's strobe device; the exhaustive sweep is the
// testbench's own.
module tb_host_sma_strobes;
  logic cpsmbg_n, cpsm2dbg_n, cldsms_n, cldesp_n, cp0rw_n, cp0as_n, cp0ds_n, mpab0;
  logic [1:0] mpsize;
  logic smwe_n, smwo_n, smre_n, smro_n;
  int checks = 0, failures = 0;

  host_sma_strobes dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) begin
      int nbytes;
      logic even, odd, cyc, rd, wr;
      {cpsmbg_n, cpsm2dbg_n, cldsms_n, cldesp_n, cp0rw_n, cp0as_n, cp0ds_n, mpab0, mpsize} = 10'(i);
      #1;
      nbytes = (mpsize == 2'b00) ? 4 : int'(mpsize);
      even = !mpab0;
      odd  = mpab0 || nbytes > 1;
      cyc  = !cpsmbg_n && !cp0as_n && !cp0ds_n;
      rd   = cyc && cp0rw_n && (!cldsms_n || !cldesp_n);
      wr   = cyc && !cp0rw_n && !cldsms_n && !cpsm2dbg_n;
      check("we", smwe_n == !(wr && even));
      check("wo", smwo_n == !(wr && odd));
      check("re", smre_n == !(rd && even));
      check("ro", smro_n == !(rd && odd));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
