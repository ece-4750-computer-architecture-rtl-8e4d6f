// inst_decoder_tb: checks the D-stage instruction decoder. Random addu,
// addiu and mul words are built field by field (not with the package's
// encoders) and must decode to the right op, registers and sign-extended
// immediate; random other words must decode as illegal unless their
// opcode/funct fields happen to match.
module inst_decoder_tb;
  import io2l_pkg::*;
  int checks = 0, failures = 0;
  word_t inst;
  dec_t  dut_dec;
  inst_decoder dut (.inst, .dec(dut_dec));
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic expect_dec(input word_t w, input bit legal, input op_e op, input areg_t rd,
                            input areg_t rs, input areg_t rt, input bit has_rt, input word_t imm);
    dec_t d;
    inst = w;
    #1;
    d = dut_dec;
    checks++;
    if (d.legal !== legal || (legal && (d.op !== op || d.rd !== rd || d.rs !== rs ||
        d.has_rt !== has_rt || (has_rt && d.rt !== rt) || (op == OP_ADDIU && d.imm !== imm)))) begin
      failures++;
      $display("FAIL %h: legal=%0d op=%0d rd=%0d rs=%0d rt=%0d imm=%h", w, d.legal, d.op, d.rd, d.rs, d.rt, d.imm);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [4:0] a, b, c;
      logic [15:0] im;
      word_t w;
      a = 5'($urandom()); b = 5'($urandom()); c = 5'($urandom()); im = 16'($urandom());
      // addu rd=c, rs=a, rt=b
      w = (32'd0 << 26) | (32'(a) << 21) | (32'(b) << 16) | (32'(c) << 11) | 32'h21;
      expect_dec(w, 1, OP_ADDU, c, a, b, 1, '0);
      // mul rd=c, rs=a, rt=b
      w = (32'h1C << 26) | (32'(a) << 21) | (32'(b) << 16) | (32'(c) << 11) | 32'h02;
      expect_dec(w, 1, OP_MUL, c, a, b, 1, '0);
      // addiu rt=b, rs=a
      w = (32'h09 << 26) | (32'(a) << 21) | (32'(b) << 16) | 32'(im);
      expect_dec(w, 1, OP_ADDIU, b, a, '0, 0, im[15] ? {16'hFFFF, im} : {16'h0000, im});
      // package encoders agree with the field-by-field words
      checks++;
      if (enc_addiu(b, a, im) !== w) begin failures++; $display("FAIL enc_addiu"); end
      // random word
      w = $urandom();
      if (w[31:26] == 6'h09 || (w[31:26] == 6'h00 && w[10:0] == 11'h021) ||
          (w[31:26] == 6'h1C && w[10:0] == 11'h002)) continue;
      expect_dec(w, 0, OP_ADDU, '0, '0, '0, 0, '0);
    end
    // words that differ from a legal one only in the shift field
    expect_dec(32'h0000_0061, 0, OP_ADDU, '0, '0, '0, 0, '0);
    expect_dec(32'h7000_0042, 0, OP_ADDU, '0, '0, '0, 0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    repeat (1) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
