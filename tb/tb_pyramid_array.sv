// tb_pyramid_array: drives a 3-layer pyramid (1 + 4 + 16 PEs) with
// micro-instructions and checks: image input into the base layer through the
// border register (4 reads from the south), the responder count, a read of
// the north-west and south-east children (each layer-1 PE receives the bits of
// its base-layer children), a read of the parent (each base PE receives its
// layer-1 parent's bit) and the root's external parent link.
module tb_pyramid_array;
  import bsp_pkg::*;
  localparam int L = 3, N = 21, NB = 4;
  logic clk = 0, rst = 1, bc = 0;
  uinstr_t ui = UI_NOP;
  edge_mode_e mode = EDGE_WIRED0;
  logic border_sel = 0, dev_load = 0, arr_capture = 0, parent_i = 0, root_o, some_o;
  logic [NB-1:0] dev_i = '0, border_q;
  logic [$clog2(N+1)-1:0] count_o;
  logic [15:0] img;
  logic [N-1:0] tap [3], e_tap;
  int checks = 0, failures = 0;

  pyramid_array #(.LEVELS(L), .MEM_BITS(16)) dut (.edge_mode(mode), .*);
  always #5 clk = ~clk;

  for (genvar p = 0; p < N; p++) begin : g_tap
    for (genvar a = 0; a < 3; a++) begin : g_a
      assign tap[a][p] = dut.g_pe[p].u_pe.mem[5 + a];
    end
    assign e_tap[p] = dut.g_pe[p].u_pe.reg_e;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic op(input uinstr_t u, input logic b = 1'b0);
    ui = u; bc = b;
    @(posedge clk); #1;
    ui = UI_NOP; bc = 1'b0;
  endtask

  initial begin : main
    @(posedge clk); #1; rst = 0;
    img = 16'($urandom);
    op(mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_A, 0), 1'b1);
    border_sel = 1;
    for (int k = 0; k <= 4; k++) begin
      dev_load = (k < 4); dev_i = (k < 4) ? img[k*4 +: 4] : '0;
      ui = (k > 0) ? mk_ui(1, SRC_NONE, SRC_NONE, FN_READ_S, 0, 0, 0, DST_E, 0) : UI_NOP;
      @(posedge clk); #1;
    end
    dev_load = 0; ui = UI_NOP; border_sel = 0;
    check(e_tap[20:5] == img, "base layer image input");
    op(mk_ui(1, SRC_NONE, SRC_E, FN_I, 0, 0, 0, DST_M, 4'd5));
    check(int'(count_o) == $countones(e_tap), "responder count");
    // layer-1 PE (r,c) reads its north-west child (2r,2c) and south-east child
    op(mk_ui(1, SRC_NONE, SRC_NONE, FN_READ_NWC, 0, 0, 0, DST_M, 4'd6));
    op(mk_ui(1, SRC_NONE, SRC_NONE, FN_READ_SEC, 0, 0, 0, DST_M, 4'd7));
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) begin
        check(tap[1][1 + r*2 + c] == img[(2*r)*4 + 2*c], $sformatf("NW child of (1,%0d,%0d)", r, c));
        check(tap[2][1 + r*2 + c] == img[(2*r+1)*4 + 2*c+1], $sformatf("SE child of (1,%0d,%0d)", r, c));
      end
    // base PEs read their parent's E; the root reads the external link
    parent_i = 1'b1;
    op(mk_ui(1, SRC_NONE, SRC_NONE, FN_READ_P, 0, 0, 0, DST_M, 4'd6));
    check(tap[1][0] == 1'b1, "root reads the external parent link");
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        check(tap[1][5 + r*4 + c] == e_tap[1 + (r/2)*2 + c/2], $sformatf("parent of (2,%0d,%0d)", r, c));
    check(root_o == e_tap[0], "root E leaves the machine");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
