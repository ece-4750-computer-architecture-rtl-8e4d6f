// exec_pipes_tb: random addu/addiu/mul issue into the X and Y0..Y3 pipes
// (an ALU op is not issued three cycles after a mul, as the scoreboard
// guarantees). Checks that an ALU result is at the end of X one cycle
// after issue and in W after two, and a mul product at the end of Y3 four
// cycles after issue and in W after five, with its tag and ROB number.
module exec_pipes_tb;
  import io2l_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        iss_valid;
  op_e         iss_op;
  logic [31:0] iss_a, iss_b;
  logic [3:0]  iss_tag, x_tag, y3_tag, w_tag;
  logic [1:0]  iss_rob, w_rob;
  logic        x_valid, y3_valid, w_valid;
  logic [31:0] x_out, y3_out, w_value;

  exec_pipes #(.TAGW(4), .ROBW(2)) dut (.*);

  typedef struct { bit v; logic [3:0] tag; logic [1:0] rob; logic [31:0] val; } exp_t;
  exp_t at_x [int], at_y [int], at_w [int];
  int now = 0, n_mul = 0, n_alu = 0;

  task automatic cmp(input string what, input bit v, input logic [3:0] tag, input logic [31:0] val,
                     input bit ev, input exp_t e);
    checks++;
    if (v !== ev || (ev && (tag !== e.tag || val !== e.val))) begin
      failures++;
      $display("FAIL cycle %0d %s: v=%0d tag=%0d val=%h expected v=%0d tag=%0d val=%h",
               now, what, v, tag, val, ev, e.tag, e.val);
    end
  endtask

  initial begin
    iss_valid = 0; iss_op = OP_ADDU; iss_a = '0; iss_b = '0; iss_tag = '0; iss_rob = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      exp_t e;
      iss_valid = $urandom_range(2) != 0;
      iss_op    = $urandom_range(1) ? OP_MUL : ($urandom_range(1) ? OP_ADDU : OP_ADDIU);
      if (iss_op != OP_MUL && at_w.exists(now + 2)) iss_op = OP_MUL;
      iss_a   = $urandom();
      iss_b   = $urandom();
      iss_tag = 4'($urandom_range(15));
      iss_rob = 2'($urandom_range(3));
      #1;
      cmp("X",  x_valid,  x_tag,  x_out,   at_x.exists(now), at_x.exists(now) ? at_x[now] : e);
      cmp("Y3", y3_valid, y3_tag, y3_out,  at_y.exists(now), at_y.exists(now) ? at_y[now] : e);
      cmp("W",  w_valid,  w_tag,  w_value, at_w.exists(now), at_w.exists(now) ? at_w[now] : e);
      if (at_w.exists(now)) begin
        checks++;
        if (w_rob !== at_w[now].rob) begin failures++; $display("FAIL W rob"); end
      end
      if (iss_valid) begin
        e.v = 1; e.tag = iss_tag; e.rob = iss_rob;
        if (iss_op == OP_MUL) begin
          e.val = iss_a * iss_b;
          at_y[now + 4] = e; at_w[now + 5] = e; n_mul++;
        end else begin
          e.val = iss_a + iss_b;
          at_x[now + 1] = e; at_w[now + 2] = e; n_alu++;
        end
      end
      @(negedge clk);
      now++;
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
