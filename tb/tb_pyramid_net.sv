// tb_pyramid_net: checks the 13 links of every PE of a 4-layer pyramid
// (1 + 4 + 16 + 64 PEs) for random E bits and every edge treatment: lateral
// links within a layer, the parent one layer up, the four children one layer
// down, the root's external parent link and the border register on the south
// edge of the base layer. The expected neighbour is found from each PE's
// (layer, row, column) position.
module tb_pyramid_net;
  import bsp_pkg::*;
  localparam int L = 4, N = ((1 << (2*L)) - 1) / 3, NB = 1 << (L-1);
  logic [N-1:0] e_i;
  edge_mode_e mode;
  logic border_sel, parent_i, root_o;
  logic [NB-1:0] border_q, south_o;
  logic [N-1:0][NB_PYRAMID-1:0] nbr_o;
  int checks = 0, failures = 0;

  pyramid_net #(.LEVELS(L)) dut (.*);

  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int id(input int l, input int r, input int c);
    return ((1 << (2*l)) - 1) / 3 + r * (1 << l) + c;
  endfunction

  // lateral neighbour of (l,r,c) at offset (dr,dc)
  function automatic logic lat(input int l, input int r, input int c, input int dr, input int dc);
    int n, rr, cc;
    n = 1 << l; rr = r + dr; cc = c + dc;
    if (rr >= 0 && rr < n && cc >= 0 && cc < n) return e_i[id(l, rr, cc)];
    if (l == L-1 && rr == n && dc == 0 && border_sel) return border_q[c];
    case (mode)
      EDGE_WIRED0: return 1'b0;
      EDGE_WIRED1: return 1'b1;
      EDGE_TORUS:  return e_i[id(l, (rr + n) % n, (cc + n) % n)];
      default: begin
        int k;
        if (dr != 0 && dc != 0) return e_i[id(l, (rr + n) % n, (cc + n) % n)];
        if (dc == 0) begin k = (c * n + rr + n*n) % (n*n); return e_i[id(l, k % n, k / n)]; end
        k = (r * n + cc + n*n) % (n*n);
        return e_i[id(l, k / n, k % n)];
      end
    endcase
  endfunction

  initial begin : main
    for (int t = 0; t < 64; t++) begin
      mode = edge_mode_e'(t % 4);
      border_sel = (t % 8) >= 4;
      e_i = N'({$urandom, $urandom, $urandom});
      border_q = NB'($urandom);
      parent_i = 1'($urandom);
      #1;
      for (int l = 0; l < L; l++)
        for (int r = 0; r < (1 << l); r++)
          for (int c = 0; c < (1 << l); c++) begin
            logic [NB_PYRAMID-1:0] x;
            x[NB_N]  = lat(l, r, c, -1, 0);
            x[NB_S]  = lat(l, r, c, 1, 0);
            x[NB_E]  = lat(l, r, c, 0, 1);
            x[NB_W]  = lat(l, r, c, 0, -1);
            x[NB_NE] = lat(l, r, c, -1, 1);
            x[NB_NW] = lat(l, r, c, -1, -1);
            x[NB_SE] = lat(l, r, c, 1, 1);
            x[NB_SW] = lat(l, r, c, 1, -1);
            x[NB_P]  = (l == 0) ? parent_i : e_i[id(l-1, r/2, c/2)];
            x[NB_NWC] = (l == L-1) ? 1'b0 : e_i[id(l+1, 2*r, 2*c)];
            x[NB_NEC] = (l == L-1) ? 1'b0 : e_i[id(l+1, 2*r, 2*c+1)];
            x[NB_SWC] = (l == L-1) ? 1'b0 : e_i[id(l+1, 2*r+1, 2*c)];
            x[NB_SEC] = (l == L-1) ? 1'b0 : e_i[id(l+1, 2*r+1, 2*c+1)];
            checks++;
            if (nbr_o[id(l, r, c)] != x) begin
              failures++;
              $display("FAIL: PE (%0d,%0d,%0d) mode %0d got %b exp %b", l, r, c, mode,
                       nbr_o[id(l, r, c)], x);
            end
          end
      checks++;
      if (root_o != e_i[0] || south_o != e_i[N-1 -: NB]) begin failures++; $display("FAIL: root_o/south_o"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
