// bus_error_timer -- bus error timer (BET) for a bus master.
//
// An 8-bit counter runs on the master's clock while its address strobe is
// active and is cleared by the transfer acknowledge (or while the strobe is
// negated).  When the count reaches TIMEOUT_CLKS without an acknowledge, a
// flip-flop sets and drives the master's bus-error input; negating the
// address strobe presets the flip-flop and so withdraws the bus error.  The
// interface uses one for the T7130 MLC (20 MHz clock, about 128 MLC clocks)
// and one for the HOST (SPYCLK); the counter/flip-flop structure follows its
// schematics, the terminal count is a parameter.  Active-low strobes.
module bus_error_timer #(
  parameter int unsigned TIMEOUT_CLKS = 128  // clocks from strobe to bus error
) (
  input  logic clk,
  input  logic as_n,     // address strobe of the master
  input  logic ack_n,    // transfer acknowledge (DTACK or DSACKx)
  output logic berr_n,   // bus error to the master
  output logic [7:0] count
);
  always_ff @(posedge clk or posedge as_n)
    if (as_n)                           count <= '0;
    else if (!ack_n)                    count <= '0;
    else if (count != 8'(TIMEOUT_CLKS)) count <= count + 8'd1;

  always_ff @(posedge clk or posedge as_n)
    if (as_n)                                        berr_n <= 1'b1;
    else if (ack_n && count == 8'(TIMEOUT_CLKS - 1)) berr_n <= 1'b0;
endmodule
