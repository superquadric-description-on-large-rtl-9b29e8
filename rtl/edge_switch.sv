// edge_switch: programmable switches on the edge lines of one mesh.
//
// The links that leave a mesh at its four edges are routed to these switches,
// which decide what the edge PEs receive from their missing neighbours:
//   EDGE_WIRED0 / EDGE_WIRED1  a constant 0 or 1,
//   EDGE_TORUS                 the PE on the opposite edge of the same row or
//                              column,
//   EDGE_SPIRAL                rows chained end to end (the west end of row i
//                              hears the east end of row i-1) and columns
//                              chained likewise (the north end of column i hears
//                              the south end of column i-1), both wrapping.
// When border_sel is set, the lines of one side (south, or east if
// BORDER_EAST) take the border register's bits instead, so that the array can
// shift an image in from, or out to, the border register.
//
// The four treatments and the border register on one edge are the published
// ones; the exact chaining order of the spiral is this design's reading of the
// sample drawing. The block is combinational: out_* are the E bits of the PEs
// whose links leave the mesh on that side (index along the side: column for
// north/south, row for west/east), in_* what those links deliver back.
module edge_switch
  import bsp_pkg::*;
#(
  parameter int unsigned NR          = 64,  // lines on the west and east sides
  parameter int unsigned NC          = 64,  // lines on the north and south sides
  parameter bit          BORDER_EAST = 1'b0, // border register on east, else south
  localparam int unsigned NB         = BORDER_EAST ? NR : NC
) (
  input  edge_mode_e    mode,
  input  logic          border_sel,
  input  logic [NB-1:0] border_q,
  input  logic [NC-1:0] out_n,
  input  logic [NC-1:0] out_s,
  input  logic [NR-1:0] out_w,
  input  logic [NR-1:0] out_e,
  output logic [NC-1:0] in_n,
  output logic [NC-1:0] in_s,
  output logic [NR-1:0] in_w,
  output logic [NR-1:0] in_e
);

  always_comb begin
    unique case (mode)
      EDGE_WIRED0: begin
        in_n = '0; in_s = '0; in_w = '0; in_e = '0;
      end
      EDGE_WIRED1: begin
        in_n = '1; in_s = '1; in_w = '1; in_e = '1;
      end
      EDGE_TORUS: begin
        in_n = out_s; in_s = out_n; in_w = out_e; in_e = out_w;
      end
      default: begin // EDGE_SPIRAL
        for (int i = 0; i < int'(NC); i++) begin
          in_n[i] = out_s[(i + int'(NC) - 1) % int'(NC)];
          in_s[i] = out_n[(i + 1) % int'(NC)];
        end
        for (int i = 0; i < int'(NR); i++) begin
          in_w[i] = out_e[(i + int'(NR) - 1) % int'(NR)];
          in_e[i] = out_w[(i + 1) % int'(NR)];
        end
      end
    endcase
    if (border_sel) begin
      if (BORDER_EAST) in_e = NR'(border_q);
      else             in_s = NC'(border_q);
    end
  end

endmodule
