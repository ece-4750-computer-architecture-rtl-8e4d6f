// io2l_top_full_tb: the top at its default sizes (64 pregs, 4-entry IQ
// and ROB), no parameter overrides. All three processors run the worked
// example and random programs, every commit checked against a sequential
// reference model, and the example's cycle timing checked on the
// pointer-based processor. The mechanisms possible at these sizes (ROB
// stall, W-port hold-back, bypasses, out-of-order issue, register freeing,
// ARF/ROB reads) must each happen.
module io2l_top_full_tb;
  import io2l_pkg::*;
  import io2l_tb_pkg::*;

  localparam int NI = 3;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  word_t prog[$];
  logic [4:0] exp_areg[$];
  word_t exp_val[$];

  logic [31:0] imem_addr [NI];
  logic [31:0] imem_data [NI];
  logic        imem_valid [NI];
  logic        c_valid [NI];
  logic [4:0]  c_areg [NI];
  logic [31:0] c_value [NI];
  events_t     ev [NI];
  logic [4:0]  arch_ra = '0;
  logic [31:0] arch_rd [NI];
  word_t       st [32];

  io2l_top t0 (.clk, .rst,
    .ptr_imem_addr(imem_addr[0]), .ptr_imem_data(imem_data[0]), .ptr_imem_valid(imem_valid[0]),
    .ptr_commit_valid(c_valid[0]), .ptr_commit_areg(c_areg[0]), .ptr_commit_value(c_value[0]),
    .ptr_commit_preg(), .ptr_commit_ppreg(), .ptr_arch_raddr(arch_ra), .ptr_arch_rdata(arch_rd[0]), .ptr_ev(ev[0]),
    .urf_imem_addr(imem_addr[1]), .urf_imem_data(imem_data[1]), .urf_imem_valid(imem_valid[1]),
    .urf_commit_valid(c_valid[1]), .urf_commit_areg(c_areg[1]), .urf_commit_value(c_value[1]),
    .urf_commit_preg(), .urf_commit_ppreg(), .urf_arch_raddr(arch_ra), .urf_arch_rdata(arch_rd[1]), .urf_ev(ev[1]),
    .val_imem_addr(imem_addr[2]), .val_imem_data(imem_data[2]), .val_imem_valid(imem_valid[2]),
    .val_commit_valid(c_valid[2]), .val_commit_areg(c_areg[2]), .val_commit_value(c_value[2]),
    .val_commit_rob(), .val_arch_raddr(arch_ra), .val_arch_rdata(arch_rd[2]), .val_ev(ev[2]));

  always_comb
    for (int i = 0; i < NI; i++) begin
      imem_valid[i] = (imem_addr[i][31:2] < 30'(prog.size()));
      imem_data[i]  = imem_valid[i] ? prog[imem_addr[i][31:2]] : '0;
    end

  int checks = 0, failures = 0;
  int cyc = 0, total_cyc = 0;
  int n_commit [NI];
  int commit_cyc[$], issue_cyc[$], ooo_cyc[$], wblock_cyc[$];
  int cnt_stall_iq = 0, cnt_stall_rob = 0, cnt_stall_fl = 0, cnt_wblock = 0;
  int cnt_byp_x = 0, cnt_byp_y = 0, cnt_byp_w = 0, cnt_ooo = 0, cnt_free = 0, cnt_arf = 0, cnt_robr = 0;

  always @(posedge clk) begin
    if (rst) cyc <= 0;
    else begin
      cyc <= cyc + 1;
      total_cyc <= total_cyc + 1;
      for (int i = 0; i < NI; i++) begin
        if (c_valid[i]) begin
          checks++;
          if (n_commit[i] >= exp_areg.size()) begin
            failures++;
            $display("FAIL inst %0d: extra commit", i);
          end else if (c_areg[i] !== exp_areg[n_commit[i]] || c_value[i] !== exp_val[n_commit[i]]) begin
            failures++;
            $display("FAIL inst %0d commit %0d: r%0d=%h expected r%0d=%h", i, n_commit[i],
                     c_areg[i], c_value[i], exp_areg[n_commit[i]], exp_val[n_commit[i]]);
          end
          n_commit[i]++;
        end
        if (ev[i].stall_iq)    cnt_stall_iq++;
        if (ev[i].stall_rob)   cnt_stall_rob++;
        if (ev[i].stall_fl)    cnt_stall_fl++;
        if (ev[i].wport_block) cnt_wblock++;
        if (ev[i].byp_x)       cnt_byp_x++;
        if (ev[i].byp_y)       cnt_byp_y++;
        if (ev[i].byp_w)       cnt_byp_w++;
        if (ev[i].issue_ooo)   cnt_ooo++;
        if (ev[i].preg_free)   cnt_free++;
        if (ev[i].arf_read)    cnt_arf++;
        if (ev[i].rob_read)    cnt_robr++;
      end
      if (c_valid[0])       commit_cyc.push_back(cyc);
      if (ev[0].issue)      issue_cyc.push_back(cyc);
      if (ev[0].issue_ooo)  ooo_cyc.push_back(cyc);
      if (ev[0].wport_block) wblock_cyc.push_back(cyc);
    end
  end

  task automatic run_prog(input int max_cycles);
    bit done;
    ref_run(prog, exp_areg, exp_val);
    rst = 1'b1;
    for (int i = 0; i < NI; i++) n_commit[i] = 0;
    commit_cyc.delete(); issue_cyc.delete(); ooo_cyc.delete(); wblock_cyc.delete();
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int c = 0; c < max_cycles; c++) begin
      @(negedge clk);
      done = 1'b1;
      for (int i = 0; i < NI; i++) if (n_commit[i] < exp_areg.size()) done = 1'b0;
      if (done) break;
    end
    for (int i = 0; i < NI; i++) begin
      checks++;
      if (n_commit[i] != exp_areg.size()) begin
        failures++;
        $display("FAIL inst %0d: %0d of %0d instructions committed", i, n_commit[i], exp_areg.size());
      end
    end
    // final architectural state, read through the debug port
    ref_state(exp_areg, exp_val, st);
    @(negedge clk);
    for (int r = 0; r < 32; r++) begin
      arch_ra = 5'(r);
      #1;
      for (int i = 0; i < NI; i++) begin
        checks++;
        if (arch_rd[i] !== st[r]) begin
          failures++;
          if (failures < 20) $display("FAIL inst %0d: r%0d = %h, expected %h", i, r, arch_rd[i], st[r]);
        end
      end
    end
  endtask

  task automatic expect_list(input string what, input int got[$], input int want[$]);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %p expected %p", what, got, want);
    end
  endtask

  initial begin
    // 1. worked example, timing
    prog_example(prog, 1'b0);
    run_prog(100);
    expect_list("example commit cycles", commit_cyc, '{8, 12, 13, 14});
    expect_list("example issue cycles", issue_cyc, '{2, 6, 7, 10});
    expect_list("example out-of-order issue", ooo_cyc, '{7});
    expect_list("example W-port block", wblock_cyc, '{5});
    // 2. worked example with values
    prog_example(prog, 1'b1);
    run_prog(100);
    checks++;
    if (exp_val[4] != 2 || exp_val[5] != 8 || exp_val[6] != 9 || exp_val[7] != 6) begin
      failures++;
      $display("FAIL reference model disagrees with the example");
    end
    // 3. random programs
    for (int t = 0; t < 6; t++) begin
      prog_random(prog, 300, (t * 20) % 100);
      run_prog(3000);
    end
    $display("events: stall_iq=%0d stall_rob=%0d stall_fl=%0d wport_block=%0d byp_x=%0d byp_y=%0d byp_w=%0d ooo=%0d free=%0d arf_read=%0d rob_read=%0d",
             cnt_stall_iq, cnt_stall_rob, cnt_stall_fl, cnt_wblock, cnt_byp_x, cnt_byp_y,
             cnt_byp_w, cnt_ooo, cnt_free, cnt_arf, cnt_robr);
    begin
      int cnts [9];
      cnts = '{cnt_stall_rob, cnt_wblock, cnt_byp_x,
               cnt_byp_y, cnt_byp_w, cnt_ooo, cnt_free, cnt_arf, cnt_robr};
      foreach (cnts[i]) begin
        checks++;
        if (cnts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
