// irq_prio_enc -- 8-to-3 priority encoder of the interrupt lines (74LS148
// function).
//
// Combinational.  Eight active-low inputs; the highest-numbered active input
// is encoded, inverted, on three active-low outputs, which drive the HOST's
// interrupt priority level pins.  With no input active the outputs are all
// high (level 0), GS is high and EO is low.  An active-low enable input EI
// forces all outputs inactive.  This is the standard function of the part
// the interface uses.
module irq_prio_enc (
  input  logic       ei_n,   // enable in
  input  logic [7:0] in_n,   // request lines, 7 = highest
  output logic [2:0] a_n,    // encoded level, inverted
  output logic       gs_n,   // group select: some input active
  output logic       eo_n    // enable out: enabled and nothing active
);
  always_comb begin
    a_n  = 3'b111;
    gs_n = 1'b1;
    eo_n = 1'b1;
    if (!ei_n) begin
      eo_n = 1'b0;
      for (int i = 0; i < 8; i++)
        if (!in_n[i]) begin
          a_n  = ~3'(i);
          gs_n = 1'b0;
          eo_n = 1'b1;
        end
    end
  end
endmodule
