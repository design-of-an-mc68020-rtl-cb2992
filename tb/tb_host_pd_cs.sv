// tb_host_pd_cs -- checks the program/data SRAM byte-lane selects against
// the MC68020 32-bit port table (which of D31..24, D23..16, D15..8, D7..0 a
// byte/word/3-byte/long cycle at each A1:A0 uses), written out as a table,
// plus the zero-wait DSACK and the PERIF/GPIT space selects.
// Combinational; outputs checked 1 ns after each vector.  The lane table is
// the MC68020's own; the space selects follow the interface's decode.
module tb_host_pd_cs;
  logic cp0as_n;
  logic [4:0] mpab_hi;
  logic [1:0] mpab_lo, mpsize;
  logic [3:0] pdcs_n;
  logic cpdsack0_n, cpdsack1_n, perifsel_n, gpitsel_n;
  int checks = 0, failures = 0;

  host_pd_cs dut (.*);

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // lanes {UU, UM, LM, LL} used, indexed by {SIZ1, SIZ0, A1, A0}
  function automatic logic [3:0] lanes(logic [1:0] sz, logic [1:0] a);
    case ({sz, a})
      4'b01_00: return 4'b1000; 4'b01_01: return 4'b0100;  // byte
      4'b01_10: return 4'b0010; 4'b01_11: return 4'b0001;
      4'b10_00: return 4'b1100; 4'b10_01: return 4'b0110;  // word
      4'b10_10: return 4'b0011; 4'b10_11: return 4'b0001;
      4'b11_00: return 4'b1110; 4'b11_01: return 4'b0111;  // 3 bytes
      4'b11_10: return 4'b0011; 4'b11_11: return 4'b0001;
      4'b00_00: return 4'b1111; 4'b00_01: return 4'b0111;  // long
      4'b00_10: return 4'b0011; default:  return 4'b0001;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 2048; i++) begin
      logic pd;
      {cp0as_n, mpab_hi, mpab_lo, mpsize} = 10'(i);
      #1;
      pd = !cp0as_n && mpab_hi[4:1] == 4'b0010;
      check("lanes", pdcs_n == (pd ? ~lanes(mpsize, mpab_lo) : 4'b1111));
      check("dsack0", cpdsack0_n == !pd);
      check("dsack1", cpdsack1_n == !pd);
      check("perif", perifsel_n == !(!cp0as_n && mpab_hi[4:2] == 3'b011));
      check("gpit", gpitsel_n == !(!cp0as_n && mpab_hi[4:2] == 3'b100));
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
