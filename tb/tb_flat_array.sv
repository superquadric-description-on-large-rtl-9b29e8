// tb_flat_array: drives an 8 x 8 4NN array and an 8 x 8 CAAPP array with
// micro-instructions, as the controller would, and checks:
//  (Both arrays receive the same micro-instructions, so each check uses
//  memory bits the other part of the test leaves alone.)
//  - image input through the border register: one bit plane shifted in a row
//    per clock (8 clocks, 4NN) or along the submesh chains (32 clocks, CAAPP,
//    four times as long), then copied from E into memory;
//  - the responder count and SOME/NONE flag for that plane;
//  - a neighbour read under the torus treatment (each PE copies its west
//    neighbour's bit) and a selected (activity-masked) store;
//  - image output: the plane shifted out through the border register.
module tb_flat_array;
  import bsp_pkg::*;
  localparam int R = 8, C = 8, N = R * C, S = 4;
  logic clk = 0, rst = 1, bc = 0;
  uinstr_t ui = UI_NOP;
  edge_mode_e mode = EDGE_WIRED0;
  logic border_sel = 0, dev_load = 0, arr_capture = 0;
  logic [C-1:0] nn_dev = '0, nn_q;
  logic [R/S-1:0] ca_dev = '0, ca_q;
  logic nn_some, ca_some;
  logic [$clog2(N+1)-1:0] nn_count, ca_count;
  logic [N-1:0] img;
  int checks = 0, failures = 0;

  flat_array #(.NET(NET_4NN), .ROWS(R), .COLS(C), .MEM_BITS(64)) dut_nn (
    .clk, .rst, .ui, .bc, .edge_mode(mode), .border_sel, .dev_load, .dev_i(nn_dev),
    .arr_capture, .border_q(nn_q), .some_o(nn_some), .count_o(nn_count));
  flat_array #(.NET(NET_CAAPP), .ROWS(R), .COLS(C), .MEM_BITS(64)) dut_ca (
    .clk, .rst, .ui, .bc, .edge_mode(mode), .border_sel, .dev_load, .dev_i(ca_dev),
    .arr_capture, .border_q(ca_q), .some_o(ca_some), .count_o(ca_count));

  always #5 clk = ~clk;

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

  // memory bits 10..12 of every PE, as planes
  logic [N-1:0] nn_tap [3], ca_tap [3];
  for (genvar p = 0; p < N; p++) begin : g_tap
    for (genvar a = 0; a < 3; a++) begin : g_a
      assign nn_tap[a][p] = dut_nn.g_pe[p].u_pe.mem[10 + a];
      assign ca_tap[a][p] = dut_ca.g_pe[p].u_pe.mem[10 + a];
    end
  end
  function automatic logic [N-1:0] nn_plane(input int a);
    return nn_tap[a - 10];
  endfunction
  function automatic logic [N-1:0] ca_plane(input int a);
    return ca_tap[a - 10];
  endfunction

  // CAAPP row-of-submeshes chain position -> PE index
  function automatic int ca_chain(input int sr, input int i);
    int sc, lr, lc;
    sc = i / (S*S); lr = (i / S) % S; lc = i % S;
    return (sr*S + lr) * C + sc*S + lc;
  endfunction

  initial begin : main
    int cyc0;
    logic [N-1:0] got, expv;
    @(posedge clk); #1; rst = 0;
    img = N'({$urandom, $urandom});
    op(mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_A, 0), 1'b1);        // all active

    // ---- image input, 4NN: R reads from the south (border register) ----
    border_sel = 1;
    for (int k = 0; k <= R; k++) begin
      dev_load = (k < R); nn_dev = (k < R) ? img[k*C +: C] : '0;
      ui = (k > 0) ? mk_ui(1, SRC_NONE, SRC_NONE, FN_READ_S, 0, 0, 0, DST_E, 0) : UI_NOP;
      @(posedge clk); #1;
    end
    dev_load = 0; ui = UI_NOP;
    op(mk_ui(1, SRC_NONE, SRC_E, FN_I, 0, 0, 0, DST_M, 9'd10));
    check(nn_plane(10) == img, "4NN image input through the border register");
    @(posedge clk); #1;
    check(int'(nn_count) == $countones(img) && nn_some == (img != 0), "4NN responder count");

    // ---- image input, CAAPP: S*C reads from the east per row of submeshes ----
    for (int k = 0; k <= S*C; k++) begin
      dev_load = (k < S*C);
      for (int sr = 0; sr < R/S; sr++) ca_dev[sr] = (k < S*C) ? img[ca_chain(sr, k)] : 1'b0;
      ui = (k > 0) ? mk_ui(1, SRC_NONE, SRC_NONE, FN_READ_E, 0, 0, 0, DST_E, 0) : UI_NOP;
      @(posedge clk); #1;
    end
    dev_load = 0; ui = UI_NOP; border_sel = 0;
    op(mk_ui(1, SRC_NONE, SRC_E, FN_I, 0, 0, 0, DST_M, 9'd12));
    check(ca_plane(12) == img, "CAAPP image input through the border register (4x longer)");
    @(posedge clk); #1;
    check(int'(ca_count) == $countones(img), "CAAPP responder count");

    // ---- neighbour read, torus: M[11] <- west neighbour's E ----
    mode = EDGE_TORUS;
    op(mk_ui(1, SRC_NONE, SRC_M, FN_I, 0, 0, 0, DST_E, 9'd10));
    op(mk_ui(1, SRC_NONE, SRC_NONE, FN_READ_W, 0, 0, 0, DST_M, 9'd11));
    got = nn_plane(11);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) expv[r*C + c] = img[r*C + (c + C - 1) % C];
    check(got == expv, "4NN torus READ W");

    // ---- selective processing: A <- M[10]; then M[12] <- 1 only where A ----
    op(mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_M, 9'd12), 1'b0);
    op(mk_ui(1, SRC_BC, SRC_M, FN_CMP, 0, 0, 0, DST_A, 9'd10), 1'b1);
    op(mk_ui(0, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_M, 9'd12), 1'b1);
    check(nn_plane(12) == img, "activity-masked store");
    op(mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_A, 0), 1'b1);

    // ---- image output, 4NN: E <- M[10], then R reads from the north ----
    op(mk_ui(1, SRC_NONE, SRC_M, FN_I, 0, 0, 0, DST_E, 9'd10));
    mode = EDGE_WIRED0;
    arr_capture = 1;
    for (int k = 0; k < R; k++) begin
      ui = mk_ui(1, SRC_NONE, SRC_NONE, FN_READ_N, 0, 0, 0, DST_E, 0);
      @(posedge clk); #1;
      check(nn_q == img[(R-1-k)*C +: C], $sformatf("4NN image output row %0d", R-1-k));
    end
    arr_capture = 0; ui = UI_NOP;
    @(posedge clk); #1;
    check(nn_some == 1'b0, "array empty after image output (SOME/NONE)");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
