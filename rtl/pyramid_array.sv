// pyramid_array: the PE array of the pyramid machine.
//
// LEVELS layers of bit-serial PEs (bsp_pe with all 13 links), from a single
// root PE down to a 2^(LEVELS-1) x 2^(LEVELS-1) base layer, joined by the
// pyramid network (pyramid_net). All PEs execute the same broadcast
// micro-instruction; the pyramid-only functions 10..18 read the diagonal,
// parent and child links. A border register on the south edge of the base
// layer does image I/O, and the response unit ORs and counts the E bits of all
// PEs. The root's parent link and E bit are brought out (parent_i, root_o) so
// that a root PE that is not the top of the machine can still be linked.
//
// The organisation follows the published pyramid; the PE is the same as in
// the flat machines. Ports and timing are as in flat_array: everything is
// synchronous to clk, some_o/count_o lag the E bits by one clock.
module pyramid_array
  import bsp_pkg::*;
#(
  parameter int unsigned LEVELS   = 7,
  parameter int unsigned MEM_BITS = PE_MEM_BITS,
  localparam int unsigned NPE     = ((1 << (2*LEVELS)) - 1) / 3,
  localparam int unsigned NB      = 1 << (LEVELS - 1),
  localparam int unsigned CW      = $clog2(NPE + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  uinstr_t       ui,
  input  logic          bc,
  input  edge_mode_e    edge_mode,
  input  logic          border_sel,
  input  logic          dev_load,
  input  logic [NB-1:0] dev_i,
  input  logic          arr_capture,
  input  logic          parent_i,
  output logic          root_o,
  output logic [NB-1:0] border_q,
  output logic          some_o,
  output logic [CW-1:0] count_o
);

  logic [NPE-1:0]                 e_all;
  logic [NPE-1:0][NB_PYRAMID-1:0] nbr;
  logic [NB-1:0]                  edge_out;

  pyramid_net #(.LEVELS(LEVELS)) u_net (
    .e_i(e_all), .mode(edge_mode), .border_sel, .border_q, .parent_i,
    .nbr_o(nbr), .south_o(edge_out), .root_o
  );

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    bsp_pe #(.MEM_BITS(MEM_BITS), .NUM_NBR(NB_PYRAMID)) u_pe (
      .clk, .rst, .ui, .bc, .nbr_i(nbr[p]), .e_o(e_all[p])
    );
  end

  border_reg #(.N(NB)) u_border (
    .clk, .rst, .dev_load, .dev_i, .arr_capture, .arr_i(edge_out), .q(border_q)
  );

  response_unit #(.N(NPE)) u_resp (
    .clk, .rst, .e_i(e_all), .some_o, .count_o
  );

endmodule
