// sys_regs -- registers the EX_CPU uses to control the HOST.
//
// Three registers on the EX_CPU side, written with byte-wide data and a
// write strobe per register (the EX_CPU bus itself is not part of this
// design; its decode is left to the system):
//   System Control (bits 31..24): D31 HOST RST, D30 HOST HLT, D29 HOST INTEN,
//     D28..24 spare read/write.  The whole register is cleared on power-on
//     and by SYCRGCL once the HOST has been reset, so HOST RST clears itself.
//   Exception vector (bits 7..0, read/write) with status bits 23..20 read
//     only: CPFC2..0 (HOST function code) and the state of the HOST reset.
//   EX_CPU-to-HOST interrupt: D31 written 1 raises the HOST interrupt (MFP
//     channel 7); written 0 withdraws it.
// Registers load on the rising edge of their write strobe.  The bit maps
// follow the register tables of the interface; the write-strobe interface
// and the way the HOST interrupt is withdrawn are this design's choices.
module sys_regs (
  input  logic       por_n,
  input  logic       sycrgc_n,   // clear of the System Control Register
  input  logic       wr_ctl,     // write strobe, System Control
  input  logic       wr_vec,     // write strobe, exception vector
  input  logic       wr_int,     // write strobe, EX_CPU to HOST interrupt
  input  logic [7:0] wdata,      // byte written (D31..24 or D7..0)
  input  logic [2:0] cpfc,       // HOST function code
  input  logic       cprst_h,    // HOST reset line
  output logic [7:0] ctl,        // System Control D31..24
  output logic [31:0] vec_stat,  // exception vector register as read
  output logic       cuprst_h,
  output logic       cuphlt_h,
  output logic       sirqen_h,
  output logic       hostint_n   // interrupt to the HOST (MFP CH7)
);
  logic [7:0] vec;

  logic ctl_clr;
  assign ctl_clr = !por_n || !sycrgc_n;

  always_ff @(posedge wr_ctl or posedge ctl_clr)
    if (ctl_clr) ctl <= '0;
    else                     ctl <= wdata;

  always_ff @(posedge wr_vec or negedge por_n)
    if (!por_n) vec <= '0;
    else        vec <= wdata;

  always_ff @(posedge wr_int or negedge por_n)
    if (!por_n) hostint_n <= 1'b1;
    else        hostint_n <= !wdata[7];

  assign cuprst_h = ctl[7];
  assign cuphlt_h = ctl[6];
  assign sirqen_h = ctl[5];
  assign vec_stat = {8'h00, cpfc, cprst_h, 4'h0, 8'h00, vec};
endmodule
