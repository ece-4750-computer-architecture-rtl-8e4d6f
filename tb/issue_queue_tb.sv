// issue_queue_tb: a 4-entry issue queue in value-capturing form (the
// value-based scheme; with pointers the same logic just keeps the tag)
// against a list model. Random inserts, wakeup broadcasts, scoreboard
// readiness and W-port state each cycle; checks full, which entry issues
// (the oldest ready one, an addu/addiu held back while the W port is
// busy), every field of the issued entry including values captured at
// wakeup (also on the cycle of insertion), and the out-of-order and
// W-port-block flags.
module issue_queue_tb;
  import io2l_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        ins_valid, full, wake_valid, wport_busy_alu;
  op_e         ins_op, iss_op;
  logic [31:0] ins_imm, wake_value, iss_imm;
  logic [2:0]  ins_dest, wake_tag, iss_dest;
  logic [1:0]  ins_rob, iss_rob;
  logic        ins_src_v [2], ins_src_p [2], iss_src_v [2], iss_src_p [2];
  logic [31:0] ins_src [2], iss_src [2];
  logic [7:0]  byp_ready;
  logic        iss_valid, iss_ooo, wport_block;

  issue_queue #(.DEPTH(4), .TAGW(3), .ROBW(2), .CAPTURE_VALUE(1'b1)) dut (.*);

  typedef struct {
    op_e op; logic [31:0] imm; logic [2:0] dest; logic [1:0] rob;
    logic sv [2]; logic sp [2]; logic [31:0] src [2];
  } ent_t;
  ent_t q[$];
  int n_issue = 0, n_ooo = 0, n_cap = 0;

  function automatic bit ready_ops(ent_t e);
    for (int k = 0; k < 2; k++) if (e.sv[k] && e.sp[k] && !byp_ready[e.src[k][2:0]]) return 0;
    return 1;
  endfunction

  function automatic ent_t wake(ent_t e);
    for (int k = 0; k < 2; k++)
      if (wake_valid && e.sv[k] && e.sp[k] && e.src[k][2:0] == wake_tag) begin
        e.sp[k] = 0; e.src[k] = wake_value; n_cap++;
      end
    return e;
  endfunction

  initial begin
    ins_valid = 0; wake_valid = 0; wport_busy_alu = 0; byp_ready = '0;
    ins_op = OP_ADDU; ins_imm = '0; ins_dest = '0; ins_rob = '0; wake_tag = '0; wake_value = '0;
    for (int k = 0; k < 2; k++) begin ins_src_v[k] = 0; ins_src_p[k] = 0; ins_src[k] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < 5000; c++) begin
      int sel;
      bit blocked;
      ent_t ne;
      ins_valid = (q.size() < 4) && $urandom_range(3) != 0;
      ins_op    = op_e'($urandom_range(2));
      ins_imm   = $urandom();
      ins_dest  = 3'($urandom_range(7));
      ins_rob   = 2'($urandom_range(3));
      for (int k = 0; k < 2; k++) begin
        ins_src_v[k] = (k == 0) || $urandom_range(1);
        ins_src_p[k] = $urandom_range(1);
        ins_src[k]   = ins_src_p[k] ? 32'($urandom_range(7)) : $urandom();
      end
      wake_valid     = $urandom_range(1);
      wake_tag       = 3'($urandom_range(7));
      wake_value     = $urandom();
      byp_ready      = 8'($urandom()) & 8'($urandom());
      wport_busy_alu = $urandom_range(1);
      #1;
      sel = -1; blocked = 0;
      foreach (q[i]) if (ready_ops(q[i])) begin
        if (q[i].op != OP_MUL && wport_busy_alu) blocked = 1;
        else if (sel < 0) sel = i;
      end
      checks += 4;
      if (full !== (q.size() == 4)) begin failures++; $display("FAIL full"); end
      if (iss_valid !== (sel >= 0)) begin failures++; $display("FAIL cycle %0d iss_valid=%0d sel=%0d", c, iss_valid, sel); end
      if (wport_block !== blocked) begin failures++; $display("FAIL wport_block"); end
      if (iss_valid && iss_ooo !== (sel != 0)) begin failures++; $display("FAIL iss_ooo"); end
      if (sel >= 0) begin
        checks++;
        n_issue++;
        if (sel != 0) n_ooo++;
        if (iss_op !== q[sel].op || iss_imm !== q[sel].imm || iss_dest !== q[sel].dest || iss_rob !== q[sel].rob)
          begin failures++; $display("FAIL issued fields"); end
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (iss_src_v[k] !== q[sel].sv[k] || (q[sel].sv[k] &&
              (iss_src_p[k] !== q[sel].sp[k] || iss_src[k] !== q[sel].src[k]))) begin
            failures++; $display("FAIL cycle %0d issued source %0d: %h expected %h", c, k, iss_src[k], q[sel].src[k]);
          end
        end
        q.delete(sel);
      end
      foreach (q[i]) q[i] = wake(q[i]);
      if (ins_valid) begin
        ne.op = ins_op; ne.imm = ins_imm; ne.dest = ins_dest; ne.rob = ins_rob;
        for (int k = 0; k < 2; k++) begin ne.sv[k] = ins_src_v[k]; ne.sp[k] = ins_src_p[k]; ne.src[k] = ins_src[k]; end
        q.push_back(wake(ne));
      end
      @(negedge clk);
    end
    checks++;
    if (n_issue < 500 || n_ooo < 50 || n_cap < 50) begin
      failures++; $display("FAIL coverage issue=%0d ooo=%0d capture=%0d", n_issue, n_ooo, n_cap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
