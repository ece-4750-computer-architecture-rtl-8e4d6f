// reorder_buffer_tb: a 4-entry ROB in both forms against a queue model.
// Random allocation, out-of-order writeback of pending entries and the
// resulting in-order commits are checked every cycle: commit only of a
// written-back head, commit order and fields, full flag, allocated entry
// numbers, the W-side areg read, and (value form) the D-side read ports.
// Also checks that a writeback in cycle t lets the head commit in t+1.
module reorder_buffer_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        alloc_valid, wb_valid;
  logic [4:0]  alloc_areg, wb_areg;
  logic [31:0] alloc_data, wb_data, commit_data;
  logic [1:0]  alloc_id, wb_id, commit_id;
  logic        full, commit_valid;
  logic [4:0]  commit_areg;
  logic [1:0]  rd_id [2];
  logic        rd_p [2];
  logic [31:0] rd_data [2];

  reorder_buffer #(.DEPTH(4), .DW(32), .WB_WRITES_DATA(1'b1)) dut (.*);

  // model
  logic        mv [4], mp [4];
  logic [4:0]  ma [4];
  logic [31:0] md [4];
  int head = 0, tail = 0, ncommit = 0;

  initial begin
    foreach (mv[i]) begin mv[i] = 0; mp[i] = 0; ma[i] = 0; md[i] = 0; end
    {alloc_valid, wb_valid} = '0;
    {alloc_areg, alloc_data, wb_id, wb_data} = '0;
    rd_id[0] = '0; rd_id[1] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < 4000; c++) begin
      int pend[$];
      pend.delete();
      for (int i = 0; i < 4; i++) if (mv[i] && mp[i]) pend.push_back(i);
      alloc_valid = !mv[tail] && $urandom_range(2) != 0;
      alloc_areg  = 5'($urandom_range(31));
      alloc_data  = $urandom();
      wb_valid    = pend.size() > 0 && $urandom_range(1) == 1;
      wb_id       = wb_valid ? 2'(pend[$urandom_range(pend.size() - 1)]) : '0;
      wb_data     = $urandom();
      rd_id[0]    = 2'($urandom_range(3));
      rd_id[1]    = 2'($urandom_range(3));
      #1;
      checks += 5;
      if (full !== mv[tail]) begin failures++; $display("FAIL full"); end
      if (alloc_id !== 2'(tail)) begin failures++; $display("FAIL alloc_id"); end
      if (commit_valid !== (mv[head] && !mp[head])) begin failures++; $display("FAIL commit_valid at %0d", c); end
      if (commit_valid && (commit_id !== 2'(head) || commit_areg !== ma[head] || commit_data !== md[head])) begin
        failures++; $display("FAIL commit fields");
      end
      if (wb_valid && wb_areg !== ma[wb_id]) begin failures++; $display("FAIL wb_areg"); end
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (mv[rd_id[k]] && (rd_p[k] !== mp[rd_id[k]] || (!mp[rd_id[k]] && rd_data[k] !== md[rd_id[k]]))) begin
          failures++; $display("FAIL read port %0d", k);
        end
      end
      begin
        bit do_commit;
        do_commit = mv[head] && !mp[head];
        @(negedge clk);
        if (wb_valid) begin mp[wb_id] = 0; md[wb_id] = wb_data; end
        if (do_commit) begin mv[head] = 0; head = (head + 1) % 4; ncommit++; end
        if (alloc_valid) begin
          mv[tail] = 1; mp[tail] = 1; ma[tail] = alloc_areg; md[tail] = alloc_data;
          tail = (tail + 1) % 4;
        end
      end
    end
    checks++;
    if (ncommit < 1000) begin failures++; $display("FAIL only %0d commits", ncommit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
