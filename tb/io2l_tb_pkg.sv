// io2l_tb_pkg: programs and a sequential reference model shared by the
// processor testbenches.
//
// ref_run executes a program one instruction at a time (all registers
// start at zero) and returns, in program order, the areg and value each
// instruction commits. Programs use only r1..r7 so that random code is
// rich in RAW, WAR and WAW dependences.
package io2l_tb_pkg;
  import io2l_pkg::*;

  function automatic void ref_run(input word_t prog[$],
                                  ref logic [4:0] exp_areg[$], ref word_t exp_val[$]);
    word_t r [32];
    word_t w, v;
    logic [4:0] rs, rt, rd;
    foreach (r[i]) r[i] = '0;
    exp_areg.delete();
    exp_val.delete();
    foreach (prog[i]) begin
      w  = prog[i];
      rs = w[25:21];
      rt = w[20:16];
      rd = w[15:11];
      if (w[31:26] == 6'h00 && w[10:0] == 11'h021)      v = r[rs] + r[rt];
      else if (w[31:26] == 6'h1C && w[10:0] == 11'h002) v = r[rs] * r[rt];
      else if (w[31:26] == 6'h09) begin
        v  = r[rs] + {{16{w[15]}}, w[15:0]};
        rd = rt;
      end else continue;
      r[rd] = v;
      exp_areg.push_back(rd);
      exp_val.push_back(v);
    end
  endfunction

  // architectural state after a program: the last value committed to
  // each areg (zero if never written)
  function automatic void ref_state(input logic [4:0] exp_areg[$], input word_t exp_val[$],
                                    output word_t st [32]);
    foreach (st[i]) st[i] = '0;
    foreach (exp_areg[i]) st[exp_areg[i]] = exp_val[i];
  endfunction

  // the four-instruction sequence of the worked example
  function automatic void prog_example(ref word_t p[$], input bit with_init);
    p.delete();
    if (with_init) begin
      p.push_back(enc_addiu(5'd2, 5'd0, 16'd1));
      p.push_back(enc_addiu(5'd3, 5'd0, 16'd2));
      p.push_back(enc_addiu(5'd5, 5'd0, 16'd4));
      p.push_back(enc_addiu(5'd7, 5'd0, 16'd5));
    end
    p.push_back(enc_mul  (5'd1, 5'd2, 5'd3));    // a: mul   r1, r2, r3
    p.push_back(enc_mul  (5'd4, 5'd1, 5'd5));    // b: mul   r4, r1, r5
    p.push_back(enc_addiu(5'd6, 5'd4, 16'd1));   // c: addiu r6, r4, 1
    p.push_back(enc_addiu(5'd4, 5'd7, 16'd1));   // d: addiu r4, r7, 1
  endfunction

  // the register-freeing example: r1 is written twice; the preg of the
  // first write may only be freed when the second write commits
  function automatic void prog_free_example(ref word_t p[$]);
    p.delete();
    p.push_back(enc_addu(5'd1, 5'd2, 5'd3));
    p.push_back(enc_addu(5'd4, 5'd1, 5'd5));
    p.push_back(enc_addu(5'd1, 5'd6, 5'd7));
    p.push_back(enc_addu(5'd8, 5'd9, 5'd10));
  endfunction

  // random code over r1..r7; mul_pct percent of the instructions are mul
  function automatic void prog_random(ref word_t p[$], input int n, input int mul_pct);
    areg_t rd, rs, rt;
    int unsigned sel;
    p.delete();
    for (int i = 0; i < n; i++) begin
      rd  = areg_t'(1 + $urandom_range(6));
      rs  = areg_t'($urandom_range(7));
      rt  = areg_t'($urandom_range(7));
      sel = $urandom_range(99);
      if (sel < mul_pct)                  p.push_back(enc_mul(rd, rs, rt));
      else if (sel < mul_pct + (100 - mul_pct) / 2) p.push_back(enc_addu(rd, rs, rt));
      else p.push_back(enc_addiu(rd, rs, 16'($urandom())));
    end
  endfunction

endpackage
