// border_reg: the border register used for high-speed image I/O.
//
// A row of N one-bit registers attached to one edge of the PE array. For
// image input the device side (digitizer, display or mass storage) loads all
// N bits in parallel every clock (dev_load), while the array, with its edge
// switches set to "border", reads the register as the neighbour of its edge
// PEs and shifts one row of bits in per clock. For image output the register
// captures, every clock, the E bits leaving the array through that edge
// (arr_capture) and the device reads them from q. If both are requested the
// device load wins.
//
// The register, its width (one bit per edge line) and the rate of one full
// register per array clock follow the published description; the two load
// controls and their priority are this design's. Timing: q changes at the
// rising edge after a load or capture request; a synchronous reset clears it.
module border_reg #(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         dev_load,
  input  logic [N-1:0] dev_i,
  input  logic         arr_capture,
  input  logic [N-1:0] arr_i,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)              q <= '0;
    else if (dev_load)    q <= dev_i;
    else if (arr_capture) q <= arr_i;
  end

endmodule
