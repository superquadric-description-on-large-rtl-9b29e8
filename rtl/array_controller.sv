// array_controller: microcoded sequencer that drives one PE array.
//
// The host loads microcode into a small store (uc_we/uc_addr/uc_wdata) and
// then issues array instructions (cmd_*), each a call to a microcode routine.
// The controller broadcasts one micro-instruction per clock to every PE
// (ui_o) together with the broadcast-comparand bit (bc_o). A routine runs in
// cmd_passes passes, one per bit of a bit-serial operand: the first pass
// starts at cmd_start, every later pass at cmd_loop, and a pass ends after
// the entry marked last. Entries marked rel have the pass number added to
// their memory address, so the same few entries walk an operand from its
// least significant bit upward. An entry's comparand bit is either its own
// constant bc_val or, with bc_pat, bit <pass> of the command's cmd_pattern
// (the pattern the controller broadcasts bit-serially). Between routines the
// controller broadcasts a no-operation (nothing is stored).
//
// Example, ADD2 (dst = dst + src, p bits), taking the published 2p+1 clocks:
//   start: IA, C <- comparand 0          (once, clears the carry)
//   loop:  IA, E <- M[src+pass]          (rel)
//          M[dst+pass] <- E + M[dst+pass] + C, C <- carry   (rel, last)
//
// The published controller is a microcoded sequencer that turns host
// instructions into calls of microcode routines and broadcasts one
// micro-instruction to all PEs per clock; its looping and subroutine fields
// are not published, so the pass/loop scheme above is this design's own.
// Handshake: a command is taken when cmd_valid and cmd_ready are both high
// (cmd_ready = not busy). Its first micro-instruction appears on ui_o in the
// next clock; busy_o stays high until its last one has been broadcast. The
// microcode store must not be written while busy_o is high.
module array_controller
  import bsp_pkg::*;
#(
  parameter int unsigned UC_DEPTH = 64,   // microcode entries
  parameter int unsigned MAX_P    = 64,   // longest operand, in bits (passes)
  localparam int unsigned UA_W    = $clog2(UC_DEPTH),
  localparam int unsigned P_W     = $clog2(MAX_P + 1)
) (
  input  logic              clk,
  input  logic              rst,
  // microcode load
  input  logic              uc_we,
  input  logic [UA_W-1:0]   uc_addr,
  input  uentry_t           uc_wdata,
  // host instruction
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [UA_W-1:0]   cmd_start,
  input  logic [UA_W-1:0]   cmd_loop,
  input  logic [P_W-1:0]    cmd_passes,
  input  logic [MAX_P-1:0]  cmd_pattern,
  // broadcast to the array
  output uinstr_t           ui_o,
  output logic              bc_o,
  output logic              busy_o
);

  uentry_t           ucode [UC_DEPTH];
  logic [UA_W-1:0]   pc, loop_pc;
  logic [P_W-1:0]    pass, passes;
  logic [MAX_P-1:0]  pattern;
  uentry_t           cur;

  always_ff @(posedge clk) begin
    if (uc_we) ucode[uc_addr] <= uc_wdata;
  end

  assign cur       = ucode[pc];
  assign cmd_ready = !busy_o;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_o  <= 1'b0;
      pc      <= '0;
      loop_pc <= '0;
      pass    <= '0;
      passes  <= '0;
      pattern <= '0;
      ui_o    <= UI_NOP;
      bc_o    <= 1'b0;
    end else if (!busy_o) begin
      ui_o <= UI_NOP;
      bc_o <= 1'b0;
      if (cmd_valid && cmd_passes != '0) begin
        busy_o  <= 1'b1;
        pc      <= cmd_start;
        loop_pc <= cmd_loop;
        pass    <= '0;
        passes  <= cmd_passes;
        pattern <= cmd_pattern;
      end
    end else begin
      ui_o <= cur.ui;
      if (cur.rel) ui_o.addr <= cur.ui.addr + ADDR_W'(pass);
      bc_o <= cur.bc_pat ? pattern[pass[$clog2(MAX_P)-1:0]] : cur.bc_val;
      if (!cur.last) begin
        pc <= pc + 1'b1;
      end else if (pass + 1'b1 == passes) begin
        busy_o <= 1'b0;
      end else begin
        pass <= pass + 1'b1;
        pc   <= loop_pc;
      end
    end
  end

endmodule
