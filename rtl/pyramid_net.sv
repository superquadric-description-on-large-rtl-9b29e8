// pyramid_net: the pyramid interconnection network.
//
// LEVELS layers of square meshes; layer l (0 = the single root PE) is
// 2^l x 2^l, so each layer has four times the PEs of the one above and the
// base layer has one PE per pixel. Inside a layer every PE is linked to its
// eight lateral neighbours (an 8NN mesh); across layers it is linked to its
// parent, PE (r/2, c/2) one layer up, and to its four children, PEs (2r,2c)
// (north-west), (2r,2c+1) (north-east), (2r+1,2c) (south-west) and
// (2r+1,2c+1) (south-east) one layer down: thirteen links in all.
//
// Flat index of PE (l,r,c) is (4^l-1)/3 + r*2^l + c. The four edges of each
// layer go through their own edge switches (torus, spiral, wired-0, wired-1,
// all layers set alike); the border register (2^(LEVELS-1) bits) is attached
// to the south edge of the base layer. The root's parent link comes from
// outside (parent_i) and the root's E bit goes out (root_o).
//
// The layer sizes, the 13-PE neighbourhood, the root's external link and the
// border register on the base layer follow the published pyramid. This
// design's own choices: a diagonal link that leaves a layer gets the torus
// neighbour under the torus and spiral treatments and the wired constant
// under the wired ones; the base layer's child links read 0. Combinational:
// nbr_o[p][k] is what PE p receives on link k (bsp_pkg NB_*).
module pyramid_net
  import bsp_pkg::*;
#(
  parameter int unsigned LEVELS = 7,
  localparam int unsigned NPE   = ((1 << (2*LEVELS)) - 1) / 3,
  localparam int unsigned NBASE = 1 << (LEVELS - 1)
) (
  input  logic [NPE-1:0]                 e_i,
  input  edge_mode_e                     mode,
  input  logic                           border_sel,
  input  logic [NBASE-1:0]               border_q,
  input  logic                           parent_i,
  output logic [NPE-1:0][NB_PYRAMID-1:0] nbr_o,
  output logic [NBASE-1:0]               south_o,
  output logic                           root_o
);

  function automatic int off(input int l);
    return ((1 << (2*l)) - 1) / 3;
  endfunction

  assign root_o = e_i[0];

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int N = 1 << l;
    localparam int O = off(l);
    logic [N-1:0] out_n, out_s, out_w, out_e, in_n, in_s, in_w, in_e;
    logic         diag_const, diag_wired;

    assign diag_wired = (mode == EDGE_WIRED0) || (mode == EDGE_WIRED1);
    assign diag_const = (mode == EDGE_WIRED1);

    for (genvar k = 0; k < N; k++) begin : g_edge
      assign out_n[k] = e_i[O + k];
      assign out_s[k] = e_i[O + (N-1)*N + k];
      assign out_w[k] = e_i[O + k*N];
      assign out_e[k] = e_i[O + k*N + N-1];
    end

    if (l == LEVELS - 1) begin : g_base
      assign south_o = out_s;
      edge_switch #(.NR(N), .NC(N), .BORDER_EAST(1'b0)) u_edge (
        .mode, .border_sel, .border_q,
        .out_n, .out_s, .out_w, .out_e, .in_n, .in_s, .in_w, .in_e
      );
    end else begin : g_upper
      edge_switch #(.NR(N), .NC(N), .BORDER_EAST(1'b0)) u_edge (
        .mode, .border_sel(1'b0), .border_q('0),
        .out_n, .out_s, .out_w, .out_e, .in_n, .in_s, .in_w, .in_e
      );
    end

    for (genvar r = 0; r < N; r++) begin : g_r
      for (genvar c = 0; c < N; c++) begin : g_c
        localparam int P  = O + r*N + c;
        localparam int RN = (r + N - 1) % N;   // torus row above
        localparam int RS = (r + 1) % N;       // torus row below
        localparam int CW = (c + N - 1) % N;   // torus column west
        localparam int CE = (c + 1) % N;       // torus column east
        // orthogonal links
        assign nbr_o[P][NB_N] = (r == 0)   ? in_n[c] : e_i[P - N];
        assign nbr_o[P][NB_S] = (r == N-1) ? in_s[c] : e_i[P + N];
        assign nbr_o[P][NB_W] = (c == 0)   ? in_w[r] : e_i[P - 1];
        assign nbr_o[P][NB_E] = (c == N-1) ? in_e[r] : e_i[P + 1];
        // diagonal links
        assign nbr_o[P][NB_NE] = (r > 0 && c < N-1) ? e_i[P - N + 1]
                               : diag_wired ? diag_const : e_i[O + RN*N + CE];
        assign nbr_o[P][NB_NW] = (r > 0 && c > 0)   ? e_i[P - N - 1]
                               : diag_wired ? diag_const : e_i[O + RN*N + CW];
        assign nbr_o[P][NB_SE] = (r < N-1 && c < N-1) ? e_i[P + N + 1]
                               : diag_wired ? diag_const : e_i[O + RS*N + CE];
        assign nbr_o[P][NB_SW] = (r < N-1 && c > 0)   ? e_i[P + N - 1]
                               : diag_wired ? diag_const : e_i[O + RS*N + CW];
        // parent
        if (l == 0) begin : g_root
          assign nbr_o[P][NB_P] = parent_i;
        end else begin : g_par
          assign nbr_o[P][NB_P] = e_i[off(l-1) + (r/2)*(N/2) + c/2];
        end
        // children
        if (l == LEVELS - 1) begin : g_leaf
          assign nbr_o[P][NB_NWC] = 1'b0;
          assign nbr_o[P][NB_NEC] = 1'b0;
          assign nbr_o[P][NB_SWC] = 1'b0;
          assign nbr_o[P][NB_SEC] = 1'b0;
        end else begin : g_kids
          localparam int C0 = off(l+1) + (2*r)*(2*N) + 2*c;
          assign nbr_o[P][NB_NWC] = e_i[C0];
          assign nbr_o[P][NB_NEC] = e_i[C0 + 1];
          assign nbr_o[P][NB_SWC] = e_i[C0 + 2*N];
          assign nbr_o[P][NB_SEC] = e_i[C0 + 2*N + 1];
        end
      end
    end
  end

endmodule
