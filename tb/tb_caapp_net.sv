// tb_caapp_net: checks the CAAPP mesh of submeshes on an 8 x 12 array (2 x 3
// submeshes of 4 x 4). The reference is written as chains: along a row of
// submeshes the PEs are visited submesh by submesh, row by row inside each
// submesh, and a PE's east/west links go to the next/previous PE of that
// chain; down a column of submeshes the chain visits submesh by submesh,
// column by column. The chain ends go through the edge switches (border
// register on the east edge).
module tb_caapp_net;
  import bsp_pkg::*;
  localparam int R = 8, C = 12, S = 4, N = R * C, NRS = R / S, NCS = C / S;
  localparam int HL = S * C, VL = S * R;   // chain lengths
  logic [N-1:0] e_i, n_o, s_o, e_o, w_o;
  edge_mode_e mode;
  logic border_sel;
  logic [NRS-1:0] border_q, east_o;
  int checks = 0, failures = 0;
  int hchain [NRS][HL];
  int vchain [NCS][VL];

  caapp_net #(.ROWS(R), .COLS(C), .SUB(S)) dut (.*);

  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ev(input int p);
    return e_i[p];
  endfunction

  // what the edge switch delivers into chain end `side` of chain k
  function automatic logic edge_in(input bit vert, input bit at_end, input int k);
    int nch;
    nch = vert ? NCS : NRS;
    case (mode)
      EDGE_WIRED0: return 1'b0;
      EDGE_WIRED1: return 1'b1;
      EDGE_TORUS:  return vert ? (at_end ? ev(vchain[k][0]) : ev(vchain[k][VL-1]))
                               : (at_end ? ev(hchain[k][0]) : ev(hchain[k][HL-1]));
      default:     return vert ? (at_end ? ev(vchain[(k+1)%nch][0]) : ev(vchain[(k+nch-1)%nch][VL-1]))
                               : (at_end ? ev(hchain[(k+1)%nch][0]) : ev(hchain[(k+nch-1)%nch][HL-1]));
    endcase
  endfunction

  initial begin : main
    for (int sr = 0; sr < NRS; sr++) begin
      int k;
      k = 0;
      for (int sc = 0; sc < NCS; sc++)
        for (int lr = 0; lr < S; lr++)
          for (int lc = 0; lc < S; lc++) hchain[sr][k++] = (sr*S + lr) * C + sc*S + lc;
    end
    for (int sc = 0; sc < NCS; sc++) begin
      int k;
      k = 0;
      for (int sr = 0; sr < NRS; sr++)
        for (int lc = 0; lc < S; lc++)
          for (int lr = 0; lr < S; lr++) vchain[sc][k++] = (sr*S + lr) * C + sc*S + lc;
    end
    for (int n = 0; n < 64; n++) begin
      mode = edge_mode_e'(n % 4);
      border_sel = (n % 8) >= 4;
      e_i = N'({$urandom, $urandom, $urandom, $urandom});
      border_q = NRS'($urandom);
      #1;
      for (int k = 0; k < NRS; k++)
        for (int i = 0; i < HL; i++) begin
          int p;
          logic xw, xe;
          p = hchain[k][i];
          xw = (i > 0) ? ev(hchain[k][i-1]) : edge_in(0, 0, k);
          xe = (i < HL-1) ? ev(hchain[k][i+1]) : (border_sel ? border_q[k] : edge_in(0, 1, k));
          checks++;
          if (w_o[p] != xw || e_o[p] != xe) begin
            failures++; $display("FAIL: row chain %0d pos %0d mode %0d", k, i, mode);
          end
        end
      for (int k = 0; k < NCS; k++)
        for (int i = 0; i < VL; i++) begin
          int p;
          logic xn, xs;
          p = vchain[k][i];
          xn = (i > 0) ? ev(vchain[k][i-1]) : edge_in(1, 0, k);
          xs = (i < VL-1) ? ev(vchain[k][i+1]) : edge_in(1, 1, k);
          checks++;
          if (n_o[p] != xn || s_o[p] != xs) begin
            failures++; $display("FAIL: column chain %0d pos %0d mode %0d", k, i, mode);
          end
        end
      for (int k = 0; k < NRS; k++) begin
        checks++;
        if (east_o[k] != ev(hchain[k][HL-1])) begin failures++; $display("FAIL: east_o"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
