// tb_edge_switch: checks the four edge treatments and the border override of
// the edge switches on a 5-row by 3-column mesh, for random edge bits, against
// the expected routing of each treatment written out here.
module tb_edge_switch;
  import bsp_pkg::*;

  localparam int NR = 5, NC = 3;
  edge_mode_e mode;
  logic border_sel;
  logic [NC-1:0] border_q, out_n, out_s, in_n, in_s;
  logic [NR-1:0] out_w, out_e, in_w, in_e;
  logic [NR-1:0] bq_e;
  logic [NC-1:0] in_n2, in_s2;
  logic [NR-1:0] in_w2, in_e2;
  int checks = 0, failures = 0;

  edge_switch #(.NR(NR), .NC(NC), .BORDER_EAST(1'b0)) dut (.*);
  edge_switch #(.NR(NR), .NC(NC), .BORDER_EAST(1'b1)) dut_e (
    .mode, .border_sel, .border_q(bq_e), .out_n, .out_s, .out_w, .out_e,
    .in_n(in_n2), .in_s(in_s2), .in_w(in_w2), .in_e(in_e2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : main
    for (int n = 0; n < 200; n++) begin
      mode = edge_mode_e'(n % 4);
      border_sel = (n % 8) >= 4;
      {out_n, out_s, out_w, out_e, border_q, bq_e} = {$urandom, $urandom};
      #1;
      for (int i = 0; i < NC; i++) begin
        logic xn, xs;
        case (mode)
          EDGE_WIRED0: begin xn = 0; xs = 0; end
          EDGE_WIRED1: begin xn = 1; xs = 1; end
          EDGE_TORUS:  begin xn = out_s[i]; xs = out_n[i]; end
          default:     begin xn = out_s[(i + NC - 1) % NC]; xs = out_n[(i + 1) % NC]; end
        endcase
        check(in_n[i] == xn && in_n2[i] == xn, $sformatf("north line %0d mode %0d", i, mode));
        check(in_s[i] == (border_sel ? border_q[i] : xs), $sformatf("south line %0d mode %0d", i, mode));
        check(in_s2[i] == xs, $sformatf("south line %0d (east border)", i));
      end
      for (int i = 0; i < NR; i++) begin
        logic xw, xe;
        case (mode)
          EDGE_WIRED0: begin xw = 0; xe = 0; end
          EDGE_WIRED1: begin xw = 1; xe = 1; end
          EDGE_TORUS:  begin xw = out_e[i]; xe = out_w[i]; end
          default:     begin xw = (i == 0) ? out_e[NR-1] : out_e[i-1];
                             xe = (i == NR-1) ? out_w[0] : out_w[i+1]; end
        endcase
        check(in_w[i] == xw && in_w2[i] == xw, $sformatf("west line %0d mode %0d", i, mode));
        check(in_e[i] == xe, $sformatf("east line %0d mode %0d", i, mode));
        check(in_e2[i] == (border_sel ? bq_e[i] : xe), $sformatf("east line %0d (east border)", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
