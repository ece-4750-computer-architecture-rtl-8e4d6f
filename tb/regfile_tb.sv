// regfile_tb: random writes and reads of a 64 x 32 register file with
// three read ports against an array model; checks reset to zero and that a
// read in the cycle of a write returns the old value.
module regfile_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [5:0]  raddr [3];
  logic [31:0] rdata [3];
  logic        we = 1'b0;
  logic [5:0]  waddr = '0;
  logic [31:0] wdata = '0;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  regfile #(.NREG(64), .W(32), .NRD(3)) dut (.*);

  initial begin
    foreach (model[i]) model[i] = '0;
    foreach (raddr[k]) raddr[k] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      we    = $urandom_range(1) == 1;
      waddr = 6'($urandom_range(63));
      wdata = $urandom();
      foreach (raddr[k]) raddr[k] = (k == 0) ? waddr : 6'($urandom_range(63));
      #1;
      foreach (raddr[k]) begin
        checks++;
        if (rdata[k] !== model[raddr[k]]) begin
          failures++;
          $display("FAIL port %0d addr %0d: %h expected %h", k, raddr[k], rdata[k], model[raddr[k]]);
        end
      end
      @(negedge clk);
      if (we) model[waddr] = wdata;
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
