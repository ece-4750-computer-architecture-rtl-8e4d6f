// io2l_pkg: types and constants shared by the two register-renaming
// processors (pointer-based and value-based).
//
// Both processors are single-issue IO2L pipelines (in-order front end,
// out-of-order issue and writeback, in-order commit) that execute only
// three instructions: addu, addiu and mul. The instruction encodings are
// the MIPS32 ones (a choice of this design; the instruction set is named
// but not encoded in the source material):
//   addu  rd, rs, rt   : opcode 000000, funct 100001
//   addiu rt, rs, imm  : opcode 001001, imm sign-extended
//   mul   rd, rs, rt   : opcode 011100, funct 000010
// Execution latencies follow the pipeline drawing: addu/addiu spend one
// cycle in X, mul spends four cycles in Y0..Y3; both then go to W and C.
package io2l_pkg;

  localparam int unsigned XLEN  = 32;
  localparam int unsigned AREGW = 5;

  // cycles from issue until the result can be bypassed to the I stage
  localparam int unsigned LAT_X = 1;
  localparam int unsigned LAT_Y = 4;

  typedef logic [XLEN-1:0]  word_t;
  typedef logic [AREGW-1:0] areg_t;

  typedef enum logic [1:0] {
    OP_ADDU  = 2'd0,
    OP_ADDIU = 2'd1,
    OP_MUL   = 2'd2
  } op_e;

  typedef struct packed {
    logic  legal;   // one of the three supported instructions
    op_e   op;
    areg_t rd;      // destination
    areg_t rs;      // source 0
    areg_t rt;      // source 1 (unused by addiu)
    logic  has_rt;  // source 1 is a register
    word_t imm;     // sign-extended immediate (addiu)
  } dec_t;

  // encoders, used by testbenches to build programs
  function automatic word_t enc_addu(areg_t rd, areg_t rs, areg_t rt);
    return {6'b000000, rs, rt, rd, 5'd0, 6'b100001};
  endfunction
  function automatic word_t enc_mul(areg_t rd, areg_t rs, areg_t rt);
    return {6'b011100, rs, rt, rd, 5'd0, 6'b000010};
  endfunction
  function automatic word_t enc_addiu(areg_t rt, areg_t rs, logic [15:0] imm);
    return {6'b001001, rs, rt, imm};
  endfunction

  // one pulse per cycle for each mechanism, brought out for observation
  typedef struct packed {
    logic commit;        // an instruction left the ROB (C stage)
    logic issue;         // an instruction left the IQ (I stage)
    logic issue_ooo;     // the issued instruction was not the oldest in the IQ
    logic stall_iq;      // D stalled: IQ full
    logic stall_rob;     // D stalled: ROB full
    logic stall_fl;      // D stalled: free list empty (pointer scheme only)
    logic wport_block;   // a ready ALU op held back by the single W port
    logic byp_x;         // an operand bypassed from the end of X
    logic byp_y;         // an operand bypassed from the end of Y3
    logic byp_w;         // an operand bypassed from W
    logic rob_read;      // D read a completed value out of the ROB (value scheme)
    logic arf_read;      // D read a value out of the ARF (value scheme)
    logic preg_free;     // C returned a previous preg to the free list
    logic rt_clear;      // RT pending bit cleared at W
  } events_t;

endpackage
