// scoreboard_tb: drives the scoreboard the way the pipeline does (allocate
// in D, issue in I, write back exactly lat+1 cycles after issue, with
// lat = 1 for addu/addiu and 4 for mul) and compares every cycle against
// a model written in absolute cycle numbers: a tag is bypassable from
// cycle issue+lat until its writeback, and the W port is busy in cycle
// issue+lat+1. An addu/addiu is only issued when the W port is free two
// cycles ahead, so writebacks never collide (checked).
module scoreboard_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NT = 16;

  logic alloc_valid, issue_valid, issue_mul, wb_valid;
  logic [3:0] alloc_tag, issue_tag, wb_tag;
  logic [NT-1:0] byp_ready, pending;
  logic wport_busy_alu;

  scoreboard #(.TAGW(4)) dut (.*);

  int  now = 0;
  bit  m_pend [NT], m_iss [NT];
  int  m_rdy_at [NT];
  int  wb_at [NT];          // -1 when no writeback is scheduled
  int  n_mul_ready = 0, n_alu_ready = 0, n_block = 0;

  function automatic bit w_busy(int cyc);
    for (int t = 0; t < NT; t++) if (wb_at[t] == cyc) return 1;
    return 0;
  endfunction

  initial begin
    for (int t = 0; t < NT; t++) begin m_pend[t] = 0; m_iss[t] = 0; m_rdy_at[t] = 0; wb_at[t] = -1; end
    {alloc_valid, issue_valid, issue_mul, wb_valid, alloc_tag, issue_tag, wb_tag} = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < 4000; c++) begin
      int free_t[$], wait_t[$], t;
      free_t.delete(); wait_t.delete();
      for (t = 0; t < NT; t++) begin
        if (!m_pend[t]) free_t.push_back(t);
        else if (!m_iss[t]) wait_t.push_back(t);
      end
      // writeback due this cycle
      wb_valid = 1'b0; wb_tag = '0;
      for (t = 0; t < NT; t++) if (wb_at[t] == now) begin wb_valid = 1'b1; wb_tag = 4'(t); end
      alloc_valid = free_t.size() > 0 && $urandom_range(1) == 1;
      alloc_tag   = alloc_valid ? 4'(free_t[$urandom_range(free_t.size() - 1)]) : '0;
      issue_valid = wait_t.size() > 0 && $urandom_range(1) == 1;
      issue_tag   = issue_valid ? 4'(wait_t[$urandom_range(wait_t.size() - 1)]) : '0;
      issue_mul   = $urandom_range(1);
      #1;
      checks++;
      if (wport_busy_alu !== w_busy(now + 2)) begin
        failures++; $display("FAIL cycle %0d: wport_busy_alu=%0d", now, wport_busy_alu);
      end
      if (issue_valid && !issue_mul && wport_busy_alu) begin issue_valid = 1'b0; n_block++; end
      for (t = 0; t < NT; t++) begin
        checks++;
        if (byp_ready[t] !== (m_pend[t] && m_iss[t] && now >= m_rdy_at[t]) || pending[t] !== m_pend[t]) begin
          failures++; $display("FAIL cycle %0d tag %0d: byp_ready=%0d pending=%0d", now, t, byp_ready[t], pending[t]);
        end
      end
      @(negedge clk);
      if (wb_valid) begin m_pend[wb_tag] = 0; wb_at[wb_tag] = -1; end
      if (issue_valid) begin
        int lat;
        lat = issue_mul ? 4 : 1;
        checks++;
        if (w_busy(now + lat + 1)) begin failures++; $display("FAIL W port collision"); end
        m_iss[issue_tag] = 1; m_rdy_at[issue_tag] = now + lat; wb_at[issue_tag] = now + lat + 1;
        if (issue_mul) n_mul_ready++; else n_alu_ready++;
      end
      if (alloc_valid) begin m_pend[alloc_tag] = 1; m_iss[alloc_tag] = 0; end
      now++;
    end
    checks++;
    if (n_mul_ready == 0 || n_alu_ready == 0 || n_block == 0) begin
      failures++; $display("FAIL coverage mul=%0d alu=%0d block=%0d", n_mul_ready, n_alu_ready, n_block);
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
