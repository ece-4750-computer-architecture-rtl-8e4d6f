// inst_decoder: the decoder of the D stage, shared by both processors.
//
// Recognises the three supported instructions by their MIPS32 opcode and
// funct fields (the shift-amount field must be zero for addu and mul) and
// extracts the register fields and the sign-extended immediate. addu and
// mul write rd and read rs and rt; addiu writes rt and reads rs only. Any
// other word comes out with legal = 0. Purely combinational. Most output
// bits are instruction fields passed through unchanged, as in any decoder.
// The encoding is this design's choice; the source material names the
// instructions but does not encode them.
module inst_decoder (
  input  io2l_pkg::word_t inst,
  output io2l_pkg::dec_t  dec
);
  import io2l_pkg::*;

  always_comb begin
    dec.legal  = 1'b0;
    dec.op     = OP_ADDU;
    dec.rs     = inst[25:21];
    dec.rt     = inst[20:16];
    dec.rd     = inst[15:11];
    dec.has_rt = 1'b1;
    dec.imm    = {{16{inst[15]}}, inst[15:0]};
    unique case (inst[31:26])
      6'b000000: if (inst[5:0] == 6'b100001 && inst[10:6] == '0) begin
        dec.legal = 1'b1;
        dec.op    = OP_ADDU;
      end
      6'b011100: if (inst[5:0] == 6'b000010 && inst[10:6] == '0) begin
        dec.legal = 1'b1;
        dec.op    = OP_MUL;
      end
      6'b001001: begin
        dec.legal  = 1'b1;
        dec.op     = OP_ADDIU;
        dec.rd     = inst[20:16];
        dec.has_rt = 1'b0;
      end
      default: ;
    endcase
  end

endmodule
