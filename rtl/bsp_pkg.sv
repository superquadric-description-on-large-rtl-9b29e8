// bsp_pkg: types and constants shared by the bit-serial processor array.
//
// The micro-instruction that the array controller broadcasts to every PE has,
// from its most significant field to its least significant one: IA (ignore the
// activity bit), SRC j, SRC i, Function, Neg (i, j, r), Dest and Address. The
// field order and the encodings of the source, destination and function codes
// follow the published micro-instruction format. The field widths are this
// design's: 3 bits per source and destination, 5 bits of function (codes 0 to
// 18 are defined) and a 9-bit address for the 512-bit local memory.
//
// The neighbour links of a PE are numbered in the order of the "Read"
// functions: link k is read by function code FN_READ_N + k. The flat machines
// use links 0..3 (N, S, E, W); the pyramid uses all 13 (the eight lateral
// neighbours, the parent and the four children).
package bsp_pkg;

  // Local memory of one PE, in bits, and the address width that reaches it.
  localparam int unsigned PE_MEM_BITS = 512;
  localparam int unsigned ADDR_W   = $clog2(PE_MEM_BITS);

  // Sources of the SEL i and SEL j multiplexers.
  typedef enum logic [2:0] {
    SRC_NONE = 3'd0,
    SRC_M    = 3'd1,
    SRC_A    = 3'd2,
    SRC_B    = 3'd3,
    SRC_C    = 3'd4,
    SRC_D    = 3'd5,
    SRC_E    = 3'd6,
    SRC_BC   = 3'd7   // broadcast comparand line
  } src_e;

  // Destinations of the result line.
  typedef enum logic [2:0] {
    DST_NONE = 3'd0,
    DST_AC   = 3'd1,  // A and C together (used by ADD/SUB)
    DST_A    = 3'd2,
    DST_B    = 3'd3,
    DST_C    = 3'd4,
    DST_D    = 3'd5,
    DST_E    = 3'd6,
    DST_M    = 3'd7
  } dst_e;

  // Functions of the function-select multiplexer.
  typedef enum logic [4:0] {
    FN_I        = 5'd0,
    FN_J        = 5'd1,
    FN_CMP      = 5'd2,   // XNOR i,j
    FN_ADD      = 5'd3,   // i + j + C, carry out to C
    FN_NAND     = 5'd4,
    FN_NOR      = 5'd5,
    FN_READ_N   = 5'd6,
    FN_READ_S   = 5'd7,
    FN_READ_E   = 5'd8,
    FN_READ_W   = 5'd9,
    FN_READ_NE  = 5'd10,  // pyramid only from here on
    FN_READ_NW  = 5'd11,
    FN_READ_SE  = 5'd12,
    FN_READ_SW  = 5'd13,
    FN_READ_P   = 5'd14,
    FN_READ_NEC = 5'd15,
    FN_READ_SEC = 5'd16,
    FN_READ_NWC = 5'd17,
    FN_READ_SWC = 5'd18
  } fcn_e;

  // Neighbour link numbers (link k is read by function FN_READ_N + k).
  localparam int unsigned NB_N   = 0;
  localparam int unsigned NB_S   = 1;
  localparam int unsigned NB_E   = 2;
  localparam int unsigned NB_W   = 3;
  localparam int unsigned NB_NE  = 4;
  localparam int unsigned NB_NW  = 5;
  localparam int unsigned NB_SE  = 6;
  localparam int unsigned NB_SW  = 7;
  localparam int unsigned NB_P   = 8;
  localparam int unsigned NB_NEC = 9;
  localparam int unsigned NB_SEC = 10;
  localparam int unsigned NB_NWC = 11;
  localparam int unsigned NB_SWC = 12;
  localparam int unsigned NB_FLAT    = 4;   // links of a 4NN or CAAPP PE
  localparam int unsigned NB_PYRAMID = 13;  // links of a pyramid PE

  // The micro-instruction broadcast to the PEs (27 bits).
  typedef struct packed {
    logic              ia;     // 1: store even when the activity bit A is 0
    src_e              src_j;
    src_e              src_i;
    fcn_e              fcn;
    logic              neg_i;  // complement source i
    logic              neg_j;  // complement source j
    logic              neg_r;  // complement the result
    dst_e              dest;
    logic [ADDR_W-1:0] addr;   // one memory address per instruction
  } uinstr_t;

  localparam uinstr_t UI_NOP = '{ia: 1'b0, src_j: SRC_NONE, src_i: SRC_NONE,
                                 fcn: FN_I, neg_i: 1'b0, neg_j: 1'b0,
                                 neg_r: 1'b0, dest: DST_NONE, addr: '0};

  // Edge treatment selected by the programmable edge switches.
  typedef enum logic [1:0] {
    EDGE_WIRED0 = 2'd0,
    EDGE_WIRED1 = 2'd1,
    EDGE_TORUS  = 2'd2,
    EDGE_SPIRAL = 2'd3
  } edge_mode_e;

  // One entry of the array controller's microcode store.
  typedef struct packed {
    uinstr_t ui;      // micro-instruction broadcast to the PEs
    logic    rel;     // add the pass number to ui.addr
    logic    bc_pat;  // comparand bit from the command's pattern
    logic    bc_val;  // else this constant comparand bit
    logic    last;    // last entry of a pass
  } uentry_t;

  // Interconnection network of a flat (single-layer) machine.
  typedef enum logic {
    NET_4NN   = 1'b0,
    NET_CAAPP = 1'b1
  } net_e;

  // Builds a micro-instruction (used by controllers' microcode and testbenches).
  function automatic uinstr_t mk_ui(input logic ia, input src_e sj, input src_e si,
                                    input fcn_e f, input logic ni, input logic nj,
                                    input logic nr, input dst_e d,
                                    input logic [ADDR_W-1:0] a);
    uinstr_t u;
    u.ia = ia; u.src_j = sj; u.src_i = si; u.fcn = f;
    u.neg_i = ni; u.neg_j = nj; u.neg_r = nr; u.dest = d; u.addr = a;
    return u;
  endfunction

endpackage
