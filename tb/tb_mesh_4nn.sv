// tb_mesh_4nn: checks the links of a 4 x 6 4NN mesh. For random E bits and
// every edge treatment (and the border register on the south edge) it
// compares what each PE receives from the north, south, east and west with the
// neighbour worked out from its (row, column) position.
module tb_mesh_4nn;
  import bsp_pkg::*;
  localparam int R = 4, C = 6, N = R * C;
  logic [N-1:0] e_i, n_o, s_o, e_o, w_o;
  edge_mode_e mode;
  logic border_sel;
  logic [C-1:0] border_q, south_o;
  int checks = 0, failures = 0;

  mesh_4nn #(.ROWS(R), .COLS(C)) dut (.*);

  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic edge_val(input int rr, input int cc, input bit vertical);
    // value delivered to a link that leaves the mesh towards (rr,cc)
    case (mode)
      EDGE_WIRED0: return 1'b0;
      EDGE_WIRED1: return 1'b1;
      EDGE_TORUS:  return e_i[((rr + R) % R) * C + (cc + C) % C];
      default: begin
        int k;
        if (vertical) begin   // column-major chain
          k = ((cc * R + rr) + N) % N;
          return e_i[(k % R) * C + k / R];
        end else begin        // row-major chain
          k = ((rr * C + cc) + N) % N;
          return e_i[k];
        end
      end
    endcase
  endfunction

  initial begin : main
    for (int n = 0; n < 64; n++) begin
      mode = edge_mode_e'(n % 4);
      border_sel = (n % 8) >= 4;
      e_i = N'({$urandom, $urandom});
      border_q = C'($urandom);
      #1;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          int p;
          logic xn, xs, xe, xw;
          p = r * C + c;
          xn = (r > 0) ? e_i[p - C] : edge_val(r - 1, c, 1);
          xs = (r < R-1) ? e_i[p + C] : (border_sel ? border_q[c] : edge_val(r + 1, c, 1));
          xw = (c > 0) ? e_i[p - 1] : edge_val(r, c - 1, 0);
          xe = (c < C-1) ? e_i[p + 1] : edge_val(r, c + 1, 0);
          checks++;
          if ({n_o[p], s_o[p], e_o[p], w_o[p]} != {xn, xs, xe, xw}) begin
            failures++;
            $display("FAIL: PE (%0d,%0d) mode %0d got %b%b%b%b exp %b%b%b%b", r, c, mode,
                     n_o[p], s_o[p], e_o[p], w_o[p], xn, xs, xe, xw);
          end
        end
      checks++;
      if (south_o != e_i[N-1 -: C]) begin failures++; $display("FAIL: south_o"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
