// response_unit: the content-addressable response of the PE array.
//
// The E (response) bits of all N PEs are ORed into the SOME/NONE flag, and
// counted by the COUNT RESPONDERS adder tree. The flag and the count are
// registered: both reflect the E bits of the previous clock. A synchronous
// reset clears them.
//
// The OR of the response bits and the responder count are published; the
// insides of the counting tree are not, so this block counts with a single
// registered population count instead of a multi-cycle tree (one new count
// every clock, one clock of latency).
module response_unit #(
  parameter int unsigned N  = 4096,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [N-1:0]  e_i,
  output logic          some_o,
  output logic [CW-1:0] count_o
);

  always_ff @(posedge clk) begin
    if (rst) begin
      some_o  <= 1'b0;
      count_o <= '0;
    end else begin
      some_o  <= |e_i;
      count_o <= CW'($countones(e_i));
    end
  end

endmodule
