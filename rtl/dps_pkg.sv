// dps_pkg: types, constants and ALU half-word functions shared by the
// dynamic-pipeline-scaling (DPS) back-end.
//
// The back-end runs in one of two modes. In deep mode every configurable
// latch is a register, so each stage of the shallow pipeline is split in two
// (14 stages instead of 7). In shallow mode those latches are transparent.
//
// The ALU is split at bit 16: the low half-word (bits 15:0) is computed in the
// first execute stage and the high half-word (bits 31:16) in the second. The
// functions below give each half. Which operations produce their low half
// early follows the original design's table of PISA instructions (add, sub, bitwise
// logic and left shift do; right shift and set-less-than do not). The set of
// operations itself is this design's choice: integer operations with two
// register sources.
package dps_pkg;

  localparam int unsigned XLEN  = 32;   // data word width
  localparam int unsigned HLEN  = 16;   // half-word width
  localparam int unsigned NLREG = 32;   // logical (architectural) registers

  typedef enum logic {
    MODE_DEEP    = 1'b0,
    MODE_SHALLOW = 1'b1
  } dps_mode_e;

  typedef enum logic [2:0] {
    OP_ADD = 3'd0,
    OP_SUB = 3'd1,
    OP_AND = 3'd2,
    OP_OR  = 3'd3,
    OP_XOR = 3'd4,
    OP_SLL = 3'd5,
    OP_SRL = 3'd6,
    OP_SLT = 3'd7
  } alu_op_e;

  // True when the operation's low half-word result exists at the end of EX1.
  function automatic logic op_early(alu_op_e op);
    case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL: return 1'b1;
      default:                                       return 1'b0;
    endcase
  endfunction

  // Every supported operation can start EX1 with only the low half-word of
  // its sources (the shift amount lives in the low half of operand b), so the
  // wakeup type of a source depends only on its producer (op_early).

  // EX1: low half-word result and the carry into the high half.
  function automatic logic [HLEN:0] alu_lo(alu_op_e op, logic [HLEN-1:0] a_lo,
                                           logic [HLEN-1:0] b_lo);
    logic [HLEN:0] r;
    logic [4:0]    sh;
    sh = b_lo[4:0];
    case (op)
      OP_ADD:  r = {1'b0, a_lo} + {1'b0, b_lo};
      OP_SUB:  r = {1'b0, a_lo} + {1'b0, ~b_lo} + 17'd1;
      OP_AND:  r = {1'b0, a_lo & b_lo};
      OP_OR:   r = {1'b0, a_lo | b_lo};
      OP_XOR:  r = {1'b0, a_lo ^ b_lo};
      OP_SLL:  r = {1'b0, (sh[4] ? 16'd0 : (a_lo << sh[3:0]))};
      default: r = '0;
    endcase
    return r;
  endfunction

  // EX2: full word result, given full operands, the EX1 carry and EX1 low half.
  function automatic logic [XLEN-1:0] alu_full(alu_op_e op, logic [XLEN-1:0] a,
                                               logic [XLEN-1:0] b, logic cin,
                                               logic [HLEN-1:0] lo);
    logic [HLEN-1:0] hi;
    logic [XLEN-1:0] r;
    case (op)
      OP_ADD:  hi = a[31:16] + b[31:16] + {15'd0, cin};
      OP_SUB:  hi = a[31:16] + ~b[31:16] + {15'd0, cin};
      OP_AND:  hi = a[31:16] & b[31:16];
      OP_OR:   hi = a[31:16] | b[31:16];
      OP_XOR:  hi = a[31:16] ^ b[31:16];
      default: hi = '0;
    endcase
    case (op)
      OP_SLL:  r = a << b[4:0];
      OP_SRL:  r = a >> b[4:0];
      OP_SLT:  r = {31'd0, ($signed(a) < $signed(b))};
      default: r = {hi, lo};
    endcase
    return r;
  endfunction

  // Reference result of an operation, used by testbenches.
  function automatic logic [XLEN-1:0] alu_ref(alu_op_e op, logic [XLEN-1:0] a,
                                              logic [XLEN-1:0] b);
    case (op)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_XOR:  return a ^ b;
      OP_SLL:  return a << b[4:0];
      OP_SRL:  return a >> b[4:0];
      default: return {31'd0, ($signed(a) < $signed(b))};
    endcase
  endfunction

  // Supply voltage (mV) of each operating level of a variable-voltage
  // processor. At level i the deep pipeline runs at i*200 MHz and the shallow
  // pipeline at i*100 MHz (levels 1..5 for a 1 GHz peak).
  function automatic logic [10:0] level_mv(logic [3:0] lev);
    case (lev)
      4'd0:    return 11'd0;
      4'd1:    return 11'd700;
      4'd2:    return 11'd820;
      4'd3:    return 11'd950;
      4'd4:    return 11'd1070;
      default: return 11'd1190;
    endcase
  endfunction

endpackage
