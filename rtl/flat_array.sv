// flat_array: the PE array of a flat machine, 4NN mesh or CAAPP.
//
// ROWS x COLS bit-serial PEs (bsp_pe), one per pixel, all executing the same
// broadcast micro-instruction, joined by the 4NN mesh (NET = NET_4NN) or the
// CAAPP mesh of 4 x 4 submeshes (NET = NET_CAAPP). The links leaving the
// array go through programmable edge switches; a border register sits on one
// edge (south for the 4NN, COLS bits; east for the CAAPP, one bit per row of
// submeshes, ROWS/4 bits) for image input and output; the response unit ORs
// and counts the E bits of all PEs for the controller.
//
// Both networks, the PE and the other parts are the published ones; the two
// machines share one PE, differing only in their links, as published. Ports:
// ui/bc are the broadcast micro-instruction and comparand bit, edge_mode and
// border_sel set the edge switches, dev_load/dev_i load the border register
// from the I/O device and arr_capture makes it capture the array's edge bits,
// border_q is its content. some_o/count_o are the SOME/NONE flag and the
// responder count, one clock behind the E bits. Everything is synchronous to
// clk; rst clears the PE registers, border register and response outputs.
module flat_array
  import bsp_pkg::*;
#(
  parameter net_e        NET      = NET_4NN,
  parameter int unsigned ROWS     = 64,
  parameter int unsigned COLS     = 64,
  parameter int unsigned MEM_BITS = PE_MEM_BITS,
  localparam int unsigned NPE     = ROWS * COLS,
  localparam int unsigned SUB     = 4,
  localparam int unsigned NB      = (NET == NET_CAAPP) ? ROWS / SUB : COLS,
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
  output logic [NB-1:0] border_q,
  output logic          some_o,
  output logic [CW-1:0] count_o
);

  logic [NPE-1:0] e_all, n_in, s_in, e_in, w_in;
  logic [NB-1:0]  edge_out;

  if (NET == NET_CAAPP) begin : g_caapp
    caapp_net #(.ROWS(ROWS), .COLS(COLS), .SUB(SUB)) u_net (
      .e_i(e_all), .mode(edge_mode), .border_sel, .border_q,
      .n_o(n_in), .s_o(s_in), .e_o(e_in), .w_o(w_in), .east_o(edge_out)
    );
  end else begin : g_4nn
    mesh_4nn #(.ROWS(ROWS), .COLS(COLS)) u_net (
      .e_i(e_all), .mode(edge_mode), .border_sel, .border_q,
      .n_o(n_in), .s_o(s_in), .e_o(e_in), .w_o(w_in), .south_o(edge_out)
    );
  end

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    bsp_pe #(.MEM_BITS(MEM_BITS), .NUM_NBR(NB_FLAT)) u_pe (
      .clk, .rst, .ui, .bc,
      .nbr_i({w_in[p], e_in[p], s_in[p], n_in[p]}),
      .e_o(e_all[p])
    );
  end

  border_reg #(.N(NB)) u_border (
    .clk, .rst, .dev_load, .dev_i, .arr_capture, .arr_i(edge_out), .q(border_q)
  );

  response_unit #(.N(NPE)) u_resp (
    .clk, .rst, .e_i(e_all), .some_o, .count_o
  );

endmodule
