// free_list_tb: checks the free list against a bit-vector model.
// Sized like the worked example (12 pregs, p7..p10 free after reset): the
// first four allocations must return p7, p8, p9, p10 and then the list is
// empty; a freed p0 is the next allocation. Then 2000 cycles of random
// allocate/free traffic, checking alloc_preg, empty and the free bits.
module free_list_tb;
  localparam int N = 12;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic alloc_req = 1'b0, free_req = 1'b0, empty;
  logic [3:0] alloc_preg, free_preg = '0;
  logic [N-1:0] free_bits, model;
  int checks = 0, failures = 0;

  free_list #(.NPREG(N), .FIRST_FREE(7)) dut (.*);

  function automatic int lowest(logic [N-1:0] m);
    for (int i = 0; i < N; i++) if (m[i]) return i;
    return -1;
  endfunction

  task automatic check_state();
    int lo;
    lo = lowest(model);
    checks++;
    if (free_bits !== model || empty !== (lo < 0) || (lo >= 0 && alloc_preg !== 4'(lo))) begin
      failures++;
      $display("FAIL free=%b model=%b empty=%b alloc=%0d", free_bits, model, empty, alloc_preg);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    model = 12'b0111_1000_0000;
    for (int k = 7; k <= 10; k++) begin
      check_state();
      checks++;
      if (alloc_preg !== 4'(k)) begin failures++; $display("FAIL alloc %0d expected p%0d", alloc_preg, k); end
      alloc_req = 1'b1;
      @(negedge clk);
      model[k] = 1'b0;
    end
    alloc_req = 1'b0;
    check_state();
    checks++;
    if (!empty) begin failures++; $display("FAIL not empty"); end
    free_req = 1'b1; free_preg = 4'd0;
    @(negedge clk);
    free_req = 1'b0; model[0] = 1'b1;
    check_state();
    for (int c = 0; c < 2000; c++) begin
      int lo, f;
      lo = lowest(model);
      alloc_req = (lo >= 0) && ($urandom_range(1) == 1);
      f = $urandom_range(N - 1);
      free_req  = !model[f] && (!alloc_req || f != lo) && ($urandom_range(1) == 1);
      free_preg = 4'(f);
      @(negedge clk);
      if (alloc_req) model[lo] = 1'b0;
      if (free_req)  model[f]  = 1'b1;
      check_state();
    end
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
