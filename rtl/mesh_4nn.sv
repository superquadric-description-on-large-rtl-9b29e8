// mesh_4nn: the four-nearest-neighbour (4NN) interconnection network.
//
// The PEs form a ROWS x COLS mesh, one PE per pixel, PE (r,c) at index
// r*COLS+c, row 0 at the north edge and column 0 at the west edge. Each PE
// hears the E bit of its north, south, east and west neighbours; the links
// that leave the mesh go through the edge switches (edge_switch), which supply
// a torus, spiral, wired-0 or wired-1 treatment, and the border register is
// attached to the south edge. The topology is the published 4NN mesh; the
// border register on the south side follows the image input routine, which
// reads the border register as the southern neighbour of the bottom row.
//
// The network is wiring plus the edge multiplexers, so it is combinational:
// n_o[p], s_o[p], e_o[p] and w_o[p] are the bits PE p receives from
// its north, south, east and west neighbour, and
// south_o is the bottom row's E bits, which the border register can capture.
module mesh_4nn
  import bsp_pkg::*;
#(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 64,
  localparam int unsigned NPE = ROWS * COLS
) (
  input  logic [NPE-1:0]                  e_i,
  input  edge_mode_e                      mode,
  input  logic                            border_sel,
  input  logic [COLS-1:0]                 border_q,
  output logic [NPE-1:0]                  n_o,
  output logic [NPE-1:0]                  s_o,
  output logic [NPE-1:0]                  e_o,
  output logic [NPE-1:0]                  w_o,
  output logic [COLS-1:0]                 south_o
);

  logic [COLS-1:0] out_n, out_s, in_n, in_s;
  logic [ROWS-1:0] out_w, out_e, in_w, in_e;

  for (genvar c = 0; c < COLS; c++) begin : g_ns
    assign out_n[c] = e_i[c];
    assign out_s[c] = e_i[(ROWS-1)*COLS + c];
  end
  for (genvar r = 0; r < ROWS; r++) begin : g_we
    assign out_w[r] = e_i[r*COLS];
    assign out_e[r] = e_i[r*COLS + COLS-1];
  end
  assign south_o = out_s;

  edge_switch #(.NR(ROWS), .NC(COLS), .BORDER_EAST(1'b0)) u_edge (
    .mode, .border_sel, .border_q,
    .out_n, .out_s, .out_w, .out_e,
    .in_n, .in_s, .in_w, .in_e
  );

  // Whole rows are moved at once: bit r*COLS+c of n_o is the E bit of
  // (r-1,c), and so on.
  always_comb begin
    n_o = {e_i[NPE-COLS-1:0], in_n};
    s_o = {in_s, e_i[NPE-1:COLS]};
    for (int r = 0; r < int'(ROWS); r++) begin
      w_o[r*COLS +: COLS] = {e_i[r*COLS +: COLS-1], in_w[r]};
      e_o[r*COLS +: COLS] = {in_e[r], e_i[r*COLS+1 +: COLS-1]};
    end
  end

endmodule
