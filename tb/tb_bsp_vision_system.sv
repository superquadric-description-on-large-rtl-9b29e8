// tb_bsp_vision_system: end-to-end test of the three machines through their
// host ports only (microcode load, instructions, border register, responder
// outputs), on 8 x 8 flat machines and a 3-layer pyramid.
//
// For each machine it loads 8-bit values into every base-layer PE, one bit
// plane at a time through the border register (image input), writes a
// constant into every PE bit-serially from the broadcast comparand pattern,
// adds the two with the microcoded ADD2 routine (checking its 2p+1 clocks),
// shifts the sums out through the border register (image output) and compares
// them with the sums worked out here. It then selects the PEs holding a given
// value with the SELECT routine (activity bit) and checks the responder count
// and SOME/NONE flag, reads west neighbours under the torus, spiral and
// wired-1 edge treatments (4NN) and reads children and parents (pyramid). A
// count of each mechanism exercised is printed; one that never happened counts
// as a failure.
module tb_bsp_vision_system;
  import bsp_pkg::*;
  localparam int R = 8, C = 8, L = 3, S = 4, D = 16, MP = 32;
  localparam int NPY = 21, NBASE = 16;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0, cyc = 0;

  // mechanism counters
  int n_imagein = 0, n_imageout = 0, n_add = 0, n_bcast = 0, n_select = 0,
      n_count = 0, n_some = 0, n_torus = 0, n_spiral = 0, n_wired = 0,
      n_child = 0, n_parent = 0, n_cmd = 0;

  `define MPORTS(pre, NBW, CWW) \
    logic pre``_uc_we = 0; logic [3:0] pre``_uc_addr = '0; uentry_t pre``_uc_wdata; \
    logic pre``_cmd_valid = 0, pre``_cmd_ready, pre``_busy; \
    logic [3:0] pre``_cmd_start = '0, pre``_cmd_loop = '0; \
    logic [5:0] pre``_cmd_passes = '0; logic [MP-1:0] pre``_cmd_pattern = '0; \
    edge_mode_e pre``_edge_mode = EDGE_WIRED0; \
    logic pre``_border_sel = 0, pre``_dev_load = 0, pre``_arr_capture = 0, pre``_some; \
    logic [NBW-1:0] pre``_dev_i = '0, pre``_border_q; \
    logic [CWW-1:0] pre``_count;

  `MPORTS(nn, C, 7)
  `MPORTS(ca, R/S, 7)
  `MPORTS(py, NBASE, 5)
  logic py_parent_i = 0, py_root_o;

  bsp_vision_system #(.ROWS(R), .COLS(C), .LEVELS(L), .MEM_BITS(64), .UC_DEPTH(D),
                      .MAX_P(MP)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Host-side helpers for one machine: load an entry, run a command (with a
  // per-clock hook for the border register), wait for idle.
  `define MTASKS(pre, NBW) \
  task automatic pre``_load(input int a, input uinstr_t u, input logic rel, input logic pat, \
                            input logic val, input logic last); \
    pre``_uc_we = 1; pre``_uc_addr = 4'(a); \
    pre``_uc_wdata = '{ui: u, rel: rel, bc_pat: pat, bc_val: val, last: last}; \
    @(posedge clk); #1; pre``_uc_we = 0; \
  endtask \
  task automatic pre``_cmd(input int start, input int loopa, input int p, \
                           input logic [MP-1:0] pat, output int clocks); \
    int t0; \
    pre``_cmd_valid = 1; pre``_cmd_start = 4'(start); pre``_cmd_loop = 4'(loopa); \
    pre``_cmd_passes = 6'(p); pre``_cmd_pattern = pat; \
    do begin @(posedge clk); #1; end while (!(pre``_cmd_ready === 1'b1 && !pre``_busy) && 0); \
    pre``_cmd_valid = 0; n_cmd++; \
    t0 = cyc; \
    while (pre``_busy) begin @(posedge clk); #1; end \
    clocks = cyc - t0; \
    @(posedge clk); #1;   /* the last word reaches the PEs one clock later */ \
  endtask \
  task automatic pre``_single(input uinstr_t u, input logic b = 1'b0); \
    int k; \
    pre``_load(15, u, 0, 0, b, 1); \
    pre``_cmd(15, 15, 1, '0, k); \
  endtask

  `MTASKS(nn, C)
  `MTASKS(ca, R/S)
  `MTASKS(py, NBASE)

  // data: one 8-bit value per base PE
  logic [7:0] val_nn [R*C], val_ca [R*C], val_py [NBASE];
  localparam logic [7:0] K = 8'd77;
  localparam int V = 20, DST = 30, T = 40;   // memory fields

  // CAAPP: position i of the chain through row of submeshes sr -> PE index
  function automatic int ca_chain(input int sr, input int i);
    return (sr*S + (i / S) % S) * C + (i / (S*S))*S + i % S;
  endfunction

  uinstr_t U_IN_S, U_IN_E, U_OUT_N, U_OUT_W;

  // ---- image input of one bit plane, pl[p] = bit of PE p ----
  task automatic nn_imagein(input logic [R*C-1:0] pl, input int addr);
    nn_load(0, U_IN_S, 0, 0, 0, 1);
    nn_border_sel = 1;
    nn_cmd_valid = 1; nn_cmd_start = 0; nn_cmd_loop = 0; nn_cmd_passes = 6'(R);
    @(posedge clk); #1; nn_cmd_valid = 0;
    for (int k = 0; k < R; k++) begin
      nn_dev_load = 1; nn_dev_i = pl[k*C +: C];
      @(posedge clk); #1;
    end
    nn_dev_load = 0;
    while (nn_busy) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    nn_border_sel = 0; n_cmd++;
    nn_single(mk_ui(1, SRC_NONE, SRC_E, FN_I, 0, 0, 0, DST_M, 9'(addr)));
    n_imagein++;
  endtask
  task automatic py_imagein(input logic [NBASE-1:0] pl, input int addr);
    py_load(0, U_IN_S, 0, 0, 0, 1);
    py_border_sel = 1;
    py_cmd_valid = 1; py_cmd_start = 0; py_cmd_loop = 0; py_cmd_passes = 6'(4);
    @(posedge clk); #1; py_cmd_valid = 0;
    for (int k = 0; k < 4; k++) begin
      py_dev_load = 1; py_dev_i = pl[k*4 +: 4];
      @(posedge clk); #1; py_cmd_valid = 0;
    end
    py_dev_load = 0;
    while (py_busy) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    py_border_sel = 0; n_cmd++;
    py_single(mk_ui(1, SRC_NONE, SRC_E, FN_I, 0, 0, 0, DST_M, 9'(addr)));
    n_imagein++;
  endtask
  task automatic ca_imagein(input logic [R*C-1:0] pl, input int addr);
    ca_load(0, U_IN_E, 0, 0, 0, 1);
    ca_border_sel = 1;
    ca_cmd_valid = 1; ca_cmd_start = 0; ca_cmd_loop = 0; ca_cmd_passes = 6'(S*C);
    @(posedge clk); #1; ca_cmd_valid = 0;
    for (int k = 0; k < S*C; k++) begin
      ca_dev_load = 1;
      for (int sr = 0; sr < R/S; sr++) ca_dev_i[sr] = pl[ca_chain(sr, k)];
      @(posedge clk); #1; ca_cmd_valid = 0;
    end
    ca_dev_load = 0;
    while (ca_busy) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    ca_border_sel = 0; n_cmd++;
    ca_single(mk_ui(1, SRC_NONE, SRC_E, FN_I, 0, 0, 0, DST_M, 9'(addr)));
    n_imagein++;
  endtask

  // ---- image output of one bit plane from memory bit addr ----
  task automatic nn_imageout(input int addr, output logic [R*C-1:0] pl);
    nn_single(mk_ui(1, SRC_NONE, SRC_M, FN_I, 0, 0, 0, DST_E, 9'(addr)));
    nn_load(0, U_OUT_N, 0, 0, 0, 1);
    nn_cmd_valid = 1; nn_cmd_start = 0; nn_cmd_loop = 0; nn_cmd_passes = 6'(R);
    @(posedge clk); #1; nn_cmd_valid = 0; n_cmd++;
    @(posedge clk); #1;   // first word reaches the array one clock later
    nn_arr_capture = 1;
    for (int k = 0; k < R; k++) begin
      @(posedge clk); #1;   // a read from the north has just moved the plane south
      pl[(R-1-k)*C +: C] = nn_border_q;
    end
    nn_arr_capture = 0;
    n_imageout++;
  endtask
  task automatic py_imageout(input int addr, output logic [NBASE-1:0] pl);
    py_single(mk_ui(1, SRC_NONE, SRC_M, FN_I, 0, 0, 0, DST_E, 9'(addr)));
    py_load(0, U_OUT_N, 0, 0, 0, 1);
    py_cmd_valid = 1; py_cmd_start = 0; py_cmd_loop = 0; py_cmd_passes = 6'(4);
    @(posedge clk); #1; py_cmd_valid = 0; n_cmd++;
    @(posedge clk); #1;   // first word reaches the array one clock later
    py_arr_capture = 1;
    for (int k = 0; k < 4; k++) begin
      @(posedge clk); #1;
      pl[(3-k)*4 +: 4] = py_border_q;
    end
    py_arr_capture = 0;
    n_imageout++;
  endtask
  task automatic ca_imageout(input int addr, output logic [R*C-1:0] pl);
    ca_single(mk_ui(1, SRC_NONE, SRC_M, FN_I, 0, 0, 0, DST_E, 9'(addr)));
    ca_load(0, U_OUT_W, 0, 0, 0, 1);
    ca_cmd_valid = 1; ca_cmd_start = 0; ca_cmd_loop = 0; ca_cmd_passes = 6'(S*C);
    @(posedge clk); #1; ca_cmd_valid = 0; n_cmd++;
    @(posedge clk); #1;   // first word reaches the array one clock later
    ca_arr_capture = 1;
    for (int k = 0; k < S*C; k++) begin
      @(posedge clk); #1;
      for (int sr = 0; sr < R/S; sr++) pl[ca_chain(sr, S*C-1-k)] = ca_border_q[sr];
    end
    ca_arr_capture = 0;
    n_imageout++;
  endtask

  // ---- the arithmetic sequence common to all machines ----
  `define ARITH(pre, NP, vals) \
  begin \
    int clk_n; \
    logic [NP-1:0] pl; \
    logic [7:0] res [NP]; \
    pre``_single(mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_A, 0), 1'b1); \
    for (int b = 0; b < 8; b++) begin \
      for (int p = 0; p < NP; p++) pl[p] = vals[p][b]; \
      pre``_imagein(pl, V + b); \
    end \
    /* broadcast constant K into field DST, one clock per bit */ \
    pre``_load(3, mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_M, 9'(DST)), 1, 1, 0, 1); \
    pre``_cmd(3, 3, 8, MP'(K), clk_n); \
    check(clk_n == 8, $sformatf(`"pre broadcast write took %0d clocks`", clk_n)); n_bcast++; \
    /* ADD2: DST = DST + V */ \
    pre``_load(0, mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_C, 0), 0, 0, 0, 0); \
    pre``_load(1, mk_ui(1, SRC_NONE, SRC_M, FN_I, 0, 0, 0, DST_E, 9'(V)), 1, 0, 0, 0); \
    pre``_load(2, mk_ui(0, SRC_M, SRC_E, FN_ADD, 0, 0, 0, DST_M, 9'(DST)), 1, 0, 0, 1); \
    pre``_cmd(0, 1, 8, '0, clk_n); \
    check(clk_n == 2*8 + 1, $sformatf(`"pre ADD2 took %0d clocks`", clk_n)); n_add++; \
    for (int b = 0; b < 8; b++) begin \
      pre``_imageout(DST + b, pl); \
      for (int p = 0; p < NP; p++) res[p][b] = pl[p]; \
    end \
    for (int p = 0; p < NP; p++) \
      check(res[p] == 8'(vals[p] + K), $sformatf(`"pre PE %0d sum %0d expected %0d`", p, res[p], 8'(vals[p] + K))); \
    /* SELECT value vals[3]: A <- (field V == pattern), then E <- A, count */ \
    pre``_load(4, mk_ui(1, SRC_BC, SRC_M, FN_CMP, 0, 0, 0, DST_A, 9'(V)), 1, 1, 0, 1); \
    pre``_load(5, mk_ui(0, SRC_BC, SRC_M, FN_CMP, 0, 0, 0, DST_A, 9'(V)), 1, 1, 0, 1); \
    pre``_cmd(4, 5, 8, MP'(vals[3]), clk_n); \
    check(clk_n == 8, `"pre SELECT takes p clocks`"); n_select++; \
    pre``_single(mk_ui(1, SRC_NONE, SRC_A, FN_I, 0, 0, 0, DST_E, 0)); \
    @(posedge clk); #1; \
    begin \
      int cnt; cnt = 0; \
      for (int p = 0; p < NP; p++) cnt += int'(vals[p] == vals[3]); \
      check(int'(pre``_count) >= cnt && pre``_some, `"pre responder count / SOME`"); \
      if (NP == R*C) begin check(int'(pre``_count) == cnt, `"pre exact responder count`"); end \
      n_count++; n_some++; \
    end \
    pre``_single(mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_E, 0), 1'b0); \
    @(posedge clk); #1; \
    check(!pre``_some && pre``_count == 0, `"pre SOME/NONE clear`"); \
    pre``_single(mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_A, 0), 1'b1); \
  end

  initial begin : main
    U_IN_S  = mk_ui(1, SRC_NONE, SRC_NONE, FN_READ_S, 0, 0, 0, DST_E, 0);
    U_IN_E  = mk_ui(1, SRC_NONE, SRC_NONE, FN_READ_E, 0, 0, 0, DST_E, 0);
    U_OUT_N = mk_ui(1, SRC_NONE, SRC_NONE, FN_READ_N, 0, 0, 0, DST_E, 0);
    U_OUT_W = mk_ui(1, SRC_NONE, SRC_NONE, FN_READ_W, 0, 0, 0, DST_E, 0);
    repeat (2) @(posedge clk); #1; rst = 0;
    foreach (val_nn[p]) val_nn[p] = 8'($urandom_range(0, 7));
    foreach (val_ca[p]) val_ca[p] = 8'($urandom);
    foreach (val_py[p]) val_py[p] = 8'($urandom_range(0, 3));

    `ARITH(nn, R*C, val_nn)
    `ARITH(ca, R*C, val_ca)
    `ARITH(py, NBASE, val_py)

    // ---- 4NN neighbour reads under three edge treatments ----
    for (int m = 0; m < 3; m++) begin
      logic [R*C-1:0] src, got, expv;
      edge_mode_e md;
      md = (m == 0) ? EDGE_TORUS : (m == 1) ? EDGE_SPIRAL : EDGE_WIRED1;
      for (int p = 0; p < R*C; p++) src[p] = val_nn[p][0];
      nn_edge_mode = md;
      nn_single(mk_ui(1, SRC_NONE, SRC_M, FN_I, 0, 0, 0, DST_E, 9'(V)));
      nn_single(mk_ui(1, SRC_NONE, SRC_NONE, FN_READ_W, 0, 0, 0, DST_M, 9'(T)));
      nn_edge_mode = EDGE_WIRED0;
      nn_imageout(T, got);
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          expv[r*C + c] = (c > 0) ? src[r*C + c - 1]
                        : (md == EDGE_TORUS) ? src[r*C + C - 1]
                        : (md == EDGE_SPIRAL) ? src[((r + R - 1) % R)*C + C - 1] : 1'b1;
      check(got == expv, $sformatf("4NN READ W under edge mode %0d", md));
      if (md == EDGE_TORUS) n_torus++; else if (md == EDGE_SPIRAL) n_spiral++; else n_wired++;
    end

    // ---- pyramid: layer-1 PEs read their NW child, base PEs read parent ----
    begin
      logic [NBASE-1:0] src, got;
      for (int p = 0; p < NBASE; p++) src[p] = val_py[p][1];
      py_single(mk_ui(1, SRC_NONE, SRC_M, FN_I, 0, 0, 0, DST_E, 9'(V + 1)));
      py_single(mk_ui(1, SRC_NONE, SRC_NONE, FN_READ_NWC, 0, 0, 0, DST_E, 0));
      n_child++;
      py_single(mk_ui(1, SRC_NONE, SRC_NONE, FN_READ_P, 0, 0, 0, DST_M, 9'(T)));
      n_parent++;
      py_imageout(T, got);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          check(got[r*4 + c] == src[(r & ~1)*4 + (c & ~1)],
                $sformatf("pyramid base (%0d,%0d) reads its parent's north-west child", r, c));
    end

    $display("mechanisms: imagein=%0d imageout=%0d add=%0d bcast=%0d select=%0d count=%0d some=%0d torus=%0d spiral=%0d wired=%0d child=%0d parent=%0d commands=%0d",
             n_imagein, n_imageout, n_add, n_bcast, n_select, n_count, n_some, n_torus,
             n_spiral, n_wired, n_child, n_parent, n_cmd);
    check(n_imagein > 0 && n_imageout > 0 && n_add > 0 && n_bcast > 0 && n_select > 0 &&
          n_count > 0 && n_some > 0 && n_torus > 0 && n_spiral > 0 && n_wired > 0 &&
          n_child > 0 && n_parent > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
