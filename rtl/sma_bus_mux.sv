// sma_bus_mux -- puts the granted master on the Shared Memory Array bus.
//
// On the board each master reaches the SMA address, data and strobe lines
// through tri-state buffers enabled by its own grant (the HOST through
// address buffers and data transceivers enabled by CPSMBGL, the MLC and the
// SPYDER-T with their own tri-state outputs).  Here the same selection is a
// multiplexer: the SPYDER-T, EX_CPU, HOST or MLC signals are passed while
// that master's grant is active (the MLC uses MLCBGL, which also covers the
// release state), and with no grant the strobes are inactive and address and
// data are zero.  Read data from the memory is returned to every master;
// each master only looks at it during its own cycle.  This multiplexer is
// this design's replacement for the board's tri-state buses.
module sma_bus_mux (
  input  logic spybg_n,
  input  logic sysmbg_n,
  input  logic cpsmbg_n,
  input  logic mlcbg_n,
  // per master: address SMAB18..1, write data, strobes {we, wo, re, ro}
  input  logic [18:1] spy_a,  input logic [15:0] spy_d,  input logic [3:0] spy_s_n,
  input  logic [18:1] sys_a,  input logic [15:0] sys_d,  input logic [3:0] sys_s_n,
  input  logic [18:1] cp_a,   input logic [15:0] cp_d,   input logic [3:0] cp_s_n,
  input  logic [18:1] mlc_a,  input logic [15:0] mlc_d,  input logic [3:0] mlc_s_n,
  output logic [18:1] smab,
  output logic [15:0] smdb_w,
  output logic        smwe_n,
  output logic        smwo_n,
  output logic        smre_n,
  output logic        smro_n
);
  logic [3:0] s_n;

  always_comb begin
    smab   = '0;
    smdb_w = '0;
    s_n    = 4'hF;
    if (!spybg_n) begin
      smab = spy_a; smdb_w = spy_d; s_n = spy_s_n;
    end else if (!sysmbg_n) begin
      smab = sys_a; smdb_w = sys_d; s_n = sys_s_n;
    end else if (!cpsmbg_n) begin
      smab = cp_a;  smdb_w = cp_d;  s_n = cp_s_n; 
    end else if (!mlcbg_n) begin
      smab = mlc_a; smdb_w = mlc_d; s_n = mlc_s_n;
    end
  end

  assign {smwe_n, smwo_n, smre_n, smro_n} = s_n;

  // The arbiter never grants two masters at once.
  a_single_owner: assert final ($onehot0({!spybg_n, !sysmbg_n, !cpsmbg_n, !mlcbg_n}));
endmodule
