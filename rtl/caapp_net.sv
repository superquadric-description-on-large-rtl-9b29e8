// caapp_net: the CAAPP interconnection network, a mesh of submeshes.
//
// The ROWS x COLS PEs are grouped into SUB x SUB submeshes. Inside a submesh
// the PEs have the usual four-neighbour links, and the submesh edges are
// closed as a double spiral: the east end of local row i links to the west end
// of local row i+1, and the south end of local column i to the north end of
// local column i+1. The two ends of each spiral, the top-left PE (its north
// and west links) and the bottom-right PE (its south and east links), are the
// only links that leave the submesh: they form the single link to each
// neighbouring submesh. So, reading along a row of submeshes, the rows of the
// PEs form one long chain of SUB*COLS PEs, and likewise down a column.
// Links leaving the whole array go through the edge switches; the border
// register (ROWS/SUB bits) is attached to the east edge, one bit per row of
// submeshes, as the image input routine reads it through the eastern link.
//
// The 4 x 4 submesh, its double-spiral edges and one link between adjacent
// submeshes are published; the exact spiral order is this design's reading of
// the drawing. Combinational. PE (r,c) is index r*COLS+c; n_o/s_o/e_o/w_o[p]
// is what PE p receives on its north/south/east/west link, east_o the bits
// leaving through the east edge (captured by the border register).
module caapp_net
  import bsp_pkg::*;
#(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 64,
  parameter int unsigned SUB  = 4,
  localparam int unsigned NPE = ROWS * COLS,
  localparam int unsigned NRS = ROWS / SUB,   // submesh rows
  localparam int unsigned NCS = COLS / SUB    // submesh columns
) (
  input  logic [NPE-1:0] e_i,
  input  edge_mode_e     mode,
  input  logic           border_sel,
  input  logic [NRS-1:0] border_q,
  output logic [NPE-1:0] n_o,
  output logic [NPE-1:0] s_o,
  output logic [NPE-1:0] e_o,
  output logic [NPE-1:0] w_o,
  output logic [NRS-1:0] east_o
);

  localparam int L = int'(SUB) - 1;  // last local row/column

  logic [NCS-1:0] out_n, out_s, in_n, in_s;
  logic [NRS-1:0] out_w, out_e, in_w, in_e;

  function automatic int idx(input int r, input int c);
    return r * int'(COLS) + c;
  endfunction

  always_comb begin
    for (int k = 0; k < int'(NCS); k++) begin
      out_n[k] = e_i[idx(0, k*int'(SUB))];
      out_s[k] = e_i[idx(int'(ROWS)-1, k*int'(SUB)+L)];
    end
    for (int k = 0; k < int'(NRS); k++) begin
      out_w[k] = e_i[idx(k*int'(SUB), 0)];
      out_e[k] = e_i[idx(k*int'(SUB)+L, int'(COLS)-1)];
    end
  end
  assign east_o = out_e;

  edge_switch #(.NR(NRS), .NC(NCS), .BORDER_EAST(1'b1)) u_edge (
    .mode, .border_sel, .border_q,
    .out_n, .out_s, .out_w, .out_e,
    .in_n, .in_s, .in_w, .in_e
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      localparam int SR = r / int'(SUB);
      localparam int SC = c / int'(SUB);
      localparam int LR = r % int'(SUB);
      localparam int LC = c % int'(SUB);
      localparam int P  = r * int'(COLS) + c;
      if (LC > 0)                 begin : g_w assign w_o[P] = e_i[P-1];                           end
      else if (LR > 0)            begin : g_w assign w_o[P] = e_i[idx(r-1, SC*int'(SUB)+L)];      end
      else if (SC > 0)            begin : g_w assign w_o[P] = e_i[idx(r+L, c-1)];                 end
      else                        begin : g_w assign w_o[P] = in_w[SR];                           end
      if (LC < L)                 begin : g_e assign e_o[P] = e_i[P+1];                           end
      else if (LR < L)            begin : g_e assign e_o[P] = e_i[idx(r+1, SC*int'(SUB))];        end
      else if (SC < int'(NCS)-1)  begin : g_e assign e_o[P] = e_i[idx(r-L, c+1)];                 end
      else                        begin : g_e assign e_o[P] = in_e[SR];                           end
      if (LR > 0)                 begin : g_n assign n_o[P] = e_i[P-int'(COLS)];                  end
      else if (LC > 0)            begin : g_n assign n_o[P] = e_i[idx(SR*int'(SUB)+L, c-1)];      end
      else if (SR > 0)            begin : g_n assign n_o[P] = e_i[idx(r-1, c+L)];                 end
      else                        begin : g_n assign n_o[P] = in_n[SC];                           end
      if (LR < L)                 begin : g_s assign s_o[P] = e_i[P+int'(COLS)];                  end
      else if (LC < L)            begin : g_s assign s_o[P] = e_i[idx(SR*int'(SUB), c+1)];        end
      else if (SR < int'(NRS)-1)  begin : g_s assign s_o[P] = e_i[idx(r+1, c-L)];                 end
      else                        begin : g_s assign s_o[P] = in_s[SC];                           end
    end
  end

endmodule
