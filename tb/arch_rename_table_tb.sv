// arch_rename_table_tb: checks the reset mapping of a 64-preg ART, then
// random commit writes and reads against an array model, including a read
// in the cycle of a write (returns the old pointer). A second reset in the
// middle checks that the mapping is restored.
module arch_rename_table_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic       c_we = 1'b0;
  logic [4:0] c_areg = '0;
  logic [5:0] c_preg = '0;
  logic [4:0] rd_areg = '0;
  logic [5:0] rd_preg;
  logic [5:0] model [32];
  int checks = 0, failures = 0;

  arch_rename_table #(.NPREG(64)) dut (.*);

  task automatic reset_model();
    foreach (model[i]) model[i] = (i == 0) ? 6'd63 : 6'(i - 1);
  endtask

  task automatic check(input string what);
    #1;
    checks++;
    if (rd_preg !== model[rd_areg]) begin
      failures++;
      $display("FAIL %s r%0d: p%0d expected p%0d", what, rd_areg, rd_preg, model[rd_areg]);
    end
  endtask

  initial begin
    reset_model();
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int r = 0; r < 32; r++) begin
      rd_areg = 5'(r);
      check("reset");
    end
    for (int c = 0; c < 3000; c++) begin
      if (c == 1500) begin
        rst = 1'b1;
        c_we = 1'b0;
        @(negedge clk) rst = 1'b0;
        reset_model();
      end
      c_we    = $urandom_range(3) != 0;
      c_areg  = 5'($urandom_range(31));
      c_preg  = 6'($urandom_range(63));
      rd_areg = ($urandom_range(1) == 1) ? c_areg : 5'($urandom_range(31));
      check("read");
      @(negedge clk);
      if (c_we) model[c_areg] = c_preg;
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
