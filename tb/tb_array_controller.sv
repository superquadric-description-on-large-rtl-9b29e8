// tb_array_controller: loads an ADD2 routine (a once-only carry clear, then a
// two-entry loop body with relative addresses) and a SELECT routine (comparand
// bits taken from the command pattern) into the microcode store, runs each
// with a few operand lengths and checks every broadcast micro-instruction and
// comparand bit, that the ADD2 takes 2p+1 clocks and the SELECT p clocks, and
// the ready/busy handshake.
module tb_array_controller;
  import bsp_pkg::*;
  localparam int D = 16, MP = 16;
  logic clk = 0, rst = 1;
  logic uc_we = 0;
  logic [3:0] uc_addr = '0;
  uentry_t uc_wdata;
  logic cmd_valid = 0, cmd_ready;
  logic [3:0] cmd_start = '0, cmd_loop = '0;
  logic [4:0] cmd_passes = '0;
  logic [MP-1:0] cmd_pattern = '0;
  uinstr_t ui_o;
  logic bc_o, busy_o;
  int checks = 0, failures = 0;

  array_controller #(.UC_DEPTH(D), .MAX_P(MP)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(input int a, input uinstr_t u, input logic rel, input logic pat,
                      input logic val, input logic last);
    uc_we = 1; uc_addr = 4'(a);
    uc_wdata = '{ui: u, rel: rel, bc_pat: pat, bc_val: val, last: last};
    @(posedge clk); #1;
    uc_we = 0;
  endtask

  // runs a command and checks the stream against exp_ui/exp_bc
  uinstr_t exp_ui [$];
  logic    exp_bc [$];
  task automatic run(input int start, input int loopa, input int p, input logic [MP-1:0] pat);
    int n;
    check(cmd_ready, "ready before a command");
    cmd_valid = 1; cmd_start = 4'(start); cmd_loop = 4'(loopa);
    cmd_passes = 5'(p); cmd_pattern = pat;
    @(posedge clk); #1;
    cmd_valid = 0;
    n = 0;
    while (busy_o) begin
      @(posedge clk); #1;
      if (n < exp_ui.size()) begin
        check(ui_o == exp_ui[n] && bc_o == exp_bc[n],
              $sformatf("word %0d: got %h/%b expected %h/%b", n, ui_o, bc_o, exp_ui[n], exp_bc[n]));
      end
      n++;
    end
    check(n == exp_ui.size(), $sformatf("routine took %0d clocks, expected %0d", n, exp_ui.size()));
    @(posedge clk); #1;
    check(ui_o == UI_NOP, "no-operation when idle");
  endtask

  initial begin : main
    uinstr_t clr, mv, add, sel0, sel;
    @(posedge clk); #1; rst = 0;
    clr  = mk_ui(1, SRC_NONE, SRC_BC, FN_I, 0, 0, 0, DST_C, 0);
    mv   = mk_ui(1, SRC_NONE, SRC_M, FN_I, 0, 0, 0, DST_E, 9'd40);
    add  = mk_ui(0, SRC_M, SRC_E, FN_ADD, 0, 0, 0, DST_M, 9'd80);
    sel0 = mk_ui(1, SRC_BC, SRC_M, FN_CMP, 0, 0, 0, DST_A, 9'd200);
    sel  = mk_ui(0, SRC_BC, SRC_M, FN_CMP, 0, 0, 0, DST_A, 9'd200);
    load(0, clr, 0, 0, 0, 0);
    load(1, mv, 1, 0, 0, 0);
    load(2, add, 1, 0, 0, 1);
    load(5, sel0, 1, 1, 0, 1);
    load(6, sel, 1, 1, 0, 1);
    for (int p = 1; p <= 12; p += 5) begin
      uinstr_t a, b;
      logic [MP-1:0] pat;
      exp_ui.delete(); exp_bc.delete();
      exp_ui.push_back(clr); exp_bc.push_back(1'b0);
      for (int i = 0; i < p; i++) begin
        a = mv;  a.addr = 9'(40 + i);
        b = add; b.addr = 9'(80 + i);
        exp_ui.push_back(a); exp_bc.push_back(1'b0);
        exp_ui.push_back(b); exp_bc.push_back(1'b0);
      end
      run(0, 1, p, '0);                 // ADD2: 2p+1 clocks
      pat = MP'($urandom);
      exp_ui.delete(); exp_bc.delete();
      for (int i = 0; i < p; i++) begin
        a = (i == 0) ? sel0 : sel; a.addr = 9'(200 + i);
        exp_ui.push_back(a); exp_bc.push_back(pat[i]);
      end
      run(5, 6, p, pat);                // SELECT: p clocks
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
