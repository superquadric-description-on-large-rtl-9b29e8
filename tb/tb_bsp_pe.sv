// tb_bsp_pe: self-checking testbench of one bit-serial PE.
//
// Part 1 runs a bit-serial addition the way the array's ADD2 routine does
// (clear C from the comparand line, then per bit: E <- M[src+i],
// M[dst+i] <- E + M[dst+i] + C) and checks the sum and the 2p+1 clock count.
// Part 2 checks the activity bit: with A = 0 nothing is stored unless IA is
// set. Part 3 drives 4000 random micro-instructions and neighbour bits and
// compares every register and the addressed memory bit with a reference
// model kept here.
module tb_bsp_pe;
  import bsp_pkg::*;

  localparam int unsigned MEMB = 512;
  localparam int unsigned NN   = NB_PYRAMID;

  logic clk = 1'b0, rst = 1'b1, bc = 1'b0;
  uinstr_t ui = UI_NOP;
  logic [NN-1:0] nbr = '0;
  logic e;
  int checks = 0, failures = 0;

  bsp_pe #(.MEM_BITS(MEMB), .NUM_NBR(NN)) dut (.clk, .rst, .ui, .bc, .nbr_i(nbr), .e_o(e));

  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic issue(input uinstr_t u, input logic b = 1'b0);
    ui = u; bc = b;
    @(posedge clk);
    #1;
  endtask

  // reference model state
  logic ma, mb, mc, md, me;
  logic mm [MEMB];

  function automatic logic msrc(input src_e s, input logic [ADDR_W-1:0] a, input logic b);
    case (s)
      SRC_NONE: return 1'b0;
      SRC_M:    return mm[a];
      SRC_A:    return ma;
      SRC_B:    return mb;
      SRC_C:    return mc;
      SRC_D:    return md;
      SRC_E:    return me;
      default:  return b;
    endcase
  endfunction

  task automatic model_step(input uinstr_t u, input logic b, input logic [NN-1:0] nb);
    logic i, j, r, co;
    i = msrc(u.src_i, u.addr, b) ^ u.neg_i;
    j = msrc(u.src_j, u.addr, b) ^ u.neg_j;
    co = (i & j) | (i & mc) | (j & mc);
    case (u.fcn)
      FN_I: r = i;
      FN_J: r = j;
      FN_CMP: r = (i == j);
      FN_ADD: r = i ^ j ^ mc;
      FN_NAND: r = !(i && j);
      FN_NOR: r = !(i || j);
      default: r = (int'(u.fcn) - 6 < int'(NN)) ? nb[int'(u.fcn) - 6] : 1'b0;
    endcase
    r = r ^ u.neg_r;
    if (ma || u.ia) begin
      if (u.dest == DST_A || u.dest == DST_AC) ma = r;
      if (u.dest == DST_B) mb = r;
      if (u.dest == DST_D) md = r;
      if (u.dest == DST_E) me = r;
      if (u.dest == DST_M) mm[u.addr] = r;
      if (u.fcn == FN_ADD) mc = co;
      else if (u.dest == DST_C || u.dest == DST_AC) mc = r;
    end
  endtask

  initial begin : main
    logic [15:0] x, y, sum;
    int t0, t1;
    #1;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);

    // ---- part 1: bit-serial ADD2 of two 16-bit values ----
    x = 16'hBEEF; y = 16'h1357;
    issue(mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_A, 0), 1'b1);  // A <- 1
    for (int k = 0; k < 16; k++) begin
      issue(mk_ui(0, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_M, ADDR_W'(100 + k)), x[k]);
      issue(mk_ui(0, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_M, ADDR_W'(200 + k)), y[k]);
    end
    t0 = cyc;
    issue(mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_C, 0), 1'b0);   // clear carry
    for (int k = 0; k < 16; k++) begin
      issue(mk_ui(1, SRC_NONE, SRC_M, FN_I, 0, 0, 0, DST_E, ADDR_W'(100 + k)));
      issue(mk_ui(0, SRC_M, SRC_E, FN_ADD, 0, 0, 0, DST_M, ADDR_W'(200 + k)));
    end
    t1 = cyc;
    check(t1 - t0 == 2 * 16 + 1, "ADD2 takes 2p+1 clocks");
    for (int k = 0; k < 16; k++) sum[k] = dut.mem[200 + k];
    check(sum == x + y, $sformatf("ADD2 sum %h expected %h", sum, x + y));
    // subtraction: C <- 1, negate source i
    issue(mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_C, 0), 1'b1);
    for (int k = 0; k < 16; k++) begin
      issue(mk_ui(1, SRC_NONE, SRC_M, FN_I, 0, 0, 0, DST_E, ADDR_W'(100 + k)));
      issue(mk_ui(0, SRC_M, SRC_E, FN_ADD, 1, 0, 0, DST_M, ADDR_W'(200 + k)));
    end
    for (int k = 0; k < 16; k++) sum[k] = dut.mem[200 + k];
    check(sum == y, $sformatf("SUB2 result %h expected %h", sum, y));

    // ---- part 2: activity bit ----
    issue(mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_B, 0), 1'b1);   // B <- 1
    issue(mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_A, 0), 1'b0);   // A <- 0
    issue(mk_ui(0, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_B, 0), 1'b0);   // ignored
    check(dut.reg_b == 1'b1, "inactive PE must not store");
    issue(mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 1, DST_E, 0), 1'b1);   // E <- ~1 with IA
    check(e == 1'b0, "IA store and result negation");
    issue(mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 1, DST_E, 0), 1'b0);
    check(e == 1'b1, "E is sent to the neighbours");

    // ---- part 3: random instructions against the model ----
    for (int k = 0; k < int'(MEMB); k++) begin
      issue(mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_M, ADDR_W'(k)), k[0] ^ k[3]);
      mm[k] = k[0] ^ k[3];
    end
    ma = dut.reg_a; mb = dut.reg_b; mc = dut.reg_c; md = dut.reg_d; me = dut.reg_e;
    for (int n = 0; n < 4000; n++) begin
      uinstr_t u;
      logic b;
      logic [NN-1:0] nb;
      u = uinstr_t'($urandom);
      u.fcn = fcn_e'($urandom_range(0, 18));
      u.addr = ADDR_W'($urandom_range(0, 15));
      b = 1'($urandom);
      nb = NN'($urandom);
      nbr = nb;
      issue(u, b);
      model_step(u, b, nb);
      check({dut.reg_a, dut.reg_b, dut.reg_c, dut.reg_d, dut.reg_e} == {ma, mb, mc, md, me} &&
            dut.mem[u.addr] == mm[u.addr],
            $sformatf("random step %0d (fcn %0d dest %0d)", n, u.fcn, u.dest));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
