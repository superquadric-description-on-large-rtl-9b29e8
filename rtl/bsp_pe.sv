// bsp_pe: one bit-serial processing element (PE) of the array.
//
// Each PE holds five one-bit registers A..E and a MEM_BITS-bit local memory M.
// Every clock it executes the micro-instruction broadcast to the whole array:
// the SEL i and SEL j multiplexers pick two source bits (none, M[addr], A..E,
// or the broadcast comparand line bc), each may be complemented, all ALU
// functions are computed in parallel (i, j, XNOR, i+j+C, NAND, NOR and the E
// bits received from the neighbours), the function select picks one, it may
// be complemented, and it is written to the destination. The local memory is
// read and written at the same address in one clock (read-modify-write).
//
// A is the activity bit: when it is 0 nothing is stored unless the
// micro-instruction's IA bit is set. C is the carry: the ADD function always
// loads the carry out into C (when the PE stores). E is the response bit; it is
// sent continuously to every neighbour (e_o) and to the response logic.
//
// All of the above follows the published PE: the register set, the source,
// destination and function codes, the negation points and the activity rule.
// This design's own choices: destination code 1 ("A,C") writes the result to A
// and, for functions other than ADD, also to C (for ADD, C takes the carry);
// a synchronous reset clears A..E (the memory is not reset); a read of a link
// the PE does not have (function code 6+NUM_NBR or above) gives 0.
//
// Interface: ui/bc are the broadcast micro-instruction and comparand bit,
// nbr_i[k] is the E bit of the neighbour on link k (see bsp_pkg), e_o is this
// PE's E bit. Timing: all state changes at the rising clock edge; the
// instruction present during a cycle takes effect at the end of that cycle.
module bsp_pe
  import bsp_pkg::*;
#(
  parameter int unsigned MEM_BITS = bsp_pkg::PE_MEM_BITS,
  parameter int unsigned NUM_NBR  = NB_FLAT
) (
  input  logic               clk,
  input  logic               rst,
  input  uinstr_t            ui,
  input  logic               bc,
  input  logic [NUM_NBR-1:0] nbr_i,
  output logic               e_o
);

  logic reg_a, reg_b, reg_c, reg_d, reg_e;
  logic mem [MEM_BITS];

  logic m_rd, si, sj, op_i, op_j, carry, fres, result, we;
  logic [$clog2(MEM_BITS)-1:0] maddr;

  assign maddr = ui.addr[$clog2(MEM_BITS)-1:0];
  assign m_rd  = mem[maddr];

  function automatic logic pick(input src_e s, input logic m, input logic a,
                                input logic b, input logic c, input logic d,
                                input logic e, input logic bcl);
    case (s)
      SRC_NONE: return 1'b0;
      SRC_M:    return m;
      SRC_A:    return a;
      SRC_B:    return b;
      SRC_C:    return c;
      SRC_D:    return d;
      SRC_E:    return e;
      default:  return bcl;
    endcase
  endfunction

  always_comb begin
    si    = pick(ui.src_i, m_rd, reg_a, reg_b, reg_c, reg_d, reg_e, bc);
    sj    = pick(ui.src_j, m_rd, reg_a, reg_b, reg_c, reg_d, reg_e, bc);
    op_i  = si ^ ui.neg_i;
    op_j  = sj ^ ui.neg_j;
    carry = (op_i & op_j) | (reg_c & (op_i ^ op_j));
    case (ui.fcn)
      FN_I:    fres = op_i;
      FN_J:    fres = op_j;
      FN_CMP:  fres = ~(op_i ^ op_j);
      FN_ADD:  fres = op_i ^ op_j ^ reg_c;
      FN_NAND: fres = ~(op_i & op_j);
      FN_NOR:  fres = ~(op_i | op_j);
      default: begin
        fres = 1'b0;
        for (int k = 0; k < int'(NUM_NBR); k++)
          if (int'(ui.fcn) == int'(FN_READ_N) + k) fres = nbr_i[k];
      end
    endcase
    result = fres ^ ui.neg_r;
    we     = reg_a | ui.ia;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {reg_a, reg_b, reg_c, reg_d, reg_e} <= '0;
    end else if (we) begin
      unique case (ui.dest)
        DST_AC:  reg_a <= result;
        DST_A:   reg_a <= result;
        DST_B:   reg_b <= result;
        DST_D:   reg_d <= result;
        DST_E:   reg_e <= result;
        default: ;
      endcase
      if (ui.fcn == FN_ADD)
        reg_c <= carry;
      else if (ui.dest == DST_AC || ui.dest == DST_C)
        reg_c <= result;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst && we && ui.dest == DST_M) mem[maddr] <= result;
  end

  assign e_o = reg_e;

endmodule
