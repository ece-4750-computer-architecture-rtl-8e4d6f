// rename_table_tb: both forms of the rename table against a model.
// P: pointer scheme, 12 pregs (reset: r1..r7 -> p0..p6, r0 -> p11, all
//    valid, none pending).
// V: value scheme, 4 names (ROB entries), all entries invalid at reset.
// Random D renames, W pending-bit clears and C valid-bit clears (a W or C
// update only takes effect if the entry still maps to that preg; a D write
// wins in the same cycle). All three read ports are compared every cycle.
module rename_table_tb;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0] rs_areg [2], rd_areg, d_areg, w_areg, c_areg;
  logic       d_we, w_we, c_we;
  logic [3:0] d_preg, w_preg, c_preg;
  logic       pv [2], pp [2], vv [2], vp [2];
  logic [3:0] ppreg [2], pold;
  logic [1:0] vpreg [2], vold;

  rename_table #(.NPREG(12), .VALUE_BASED(1'b0)) dut_p (.clk, .rst,
    .rs_areg, .rs_v(pv), .rs_p(pp), .rs_preg(ppreg), .rd_areg, .rd_old_preg(pold),
    .d_we, .d_areg, .d_preg, .w_we, .w_areg, .w_preg, .c_we, .c_areg, .c_preg);
  rename_table #(.NPREG(4), .VALUE_BASED(1'b1)) dut_v (.clk, .rst,
    .rs_areg, .rs_v(vv), .rs_p(vp), .rs_preg(vpreg), .rd_areg, .rd_old_preg(vold),
    .d_we, .d_areg, .d_preg(d_preg[1:0]), .w_we, .w_areg, .w_preg(w_preg[1:0]),
    .c_we, .c_areg, .c_preg(c_preg[1:0]));

  logic       mv [2][32], mp [2][32];
  logic [3:0] mr [2][32];

  task automatic cmp(input int m, input logic v, input logic p, input logic [3:0] r, input logic [4:0] a);
    checks++;
    if (v !== mv[m][a] || (mv[m][a] && (p !== mp[m][a] || r !== mr[m][a]))) begin
      failures++;
      $display("FAIL table %0d r%0d: v%0d p%0d preg%0d expected v%0d p%0d preg%0d",
               m, a, v, p, r, mv[m][a], mp[m][a], mr[m][a]);
    end
  endtask

  initial begin
    for (int a = 0; a < 32; a++) begin
      mv[0][a] = 1'b1; mp[0][a] = 1'b0; mr[0][a] = (a == 0) ? 4'd11 : 4'(a - 1);
      mv[1][a] = 1'b0; mp[1][a] = 1'b0; mr[1][a] = '0;
    end
    {d_we, w_we, c_we} = '0;
    {d_areg, w_areg, c_areg, rd_areg, d_preg, w_preg, c_preg} = '0;
    rs_areg[0] = '0; rs_areg[1] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      d_we = $urandom_range(1); d_areg = 5'($urandom_range(7)); d_preg = 4'($urandom_range(11));
      w_we = $urandom_range(1); w_areg = 5'($urandom_range(7)); w_preg = 4'($urandom_range(11));
      c_we = $urandom_range(1); c_areg = 5'($urandom_range(7)); c_preg = 4'($urandom_range(3));
      // half of the W/C updates use the current mapping, so they hit
      if ($urandom_range(1)) w_preg = mr[0][w_areg];
      if ($urandom_range(1)) c_preg = mr[1][c_areg];
      rs_areg[0] = 5'($urandom_range(8)); rs_areg[1] = 5'($urandom_range(8));
      rd_areg = 5'($urandom_range(8));
      #1;
      for (int k = 0; k < 2; k++) begin
        cmp(0, pv[k], pp[k], ppreg[k], rs_areg[k]);
        cmp(1, vv[k], vp[k], {2'b0, vpreg[k]}, rs_areg[k]);
      end
      checks++;
      if (pold !== mr[0][rd_areg]) begin failures++; $display("FAIL old preg"); end
      @(negedge clk);
      // pointer scheme model
      if (w_we && mr[0][w_areg] == w_preg) mp[0][w_areg] = 1'b0;
      if (d_we) begin mp[0][d_areg] = 1'b1; mr[0][d_areg] = d_preg; end
      // value scheme model (names are 2 bits wide)
      if (w_we && mv[1][w_areg] && mr[1][w_areg] == {2'b0, w_preg[1:0]}) mp[1][w_areg] = 1'b0;
      if (c_we && mv[1][c_areg] && mr[1][c_areg] == {2'b0, c_preg[1:0]}) mv[1][c_areg] = 1'b0;
      if (d_we) begin mv[1][d_areg] = 1'b1; mp[1][d_areg] = 1'b1; mr[1][d_areg] = {2'b0, d_preg[1:0]}; end
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
