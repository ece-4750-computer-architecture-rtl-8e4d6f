// io2l_ptr_core_tb: self-checking test of the pointer-based processor.
//
// Three instances run the same programs: A with default sizes (PRF + ARF),
// B with only two free pregs (NPREG=34) so that D stalls on an empty free
// list, and U with the unified register file (URF + ART).
// R has an 8-entry ROB, so that the 4-entry IQ can fill before the ROB.
// 1. The worked example (mul r1,r2,r3 / mul r4,r1,r5 / addiu r6,r4,1 /
//    addiu r4,r7,1) from reset: on A the commit cycles must be 8, 12, 13,
//    14 and the issue cycles 2, 6, 7, 10, the pregs allocated and freed
//    must follow the hand trace, counted from the cycle the first
//    instruction is in F; d issues ahead of c and the W port holds d back
//    in cycle 5.
// 2. The example with its register initialisation, values checked.
// 3. The register-freeing example (addu r1,r2,r3 / addu r4,r1,r5 /
//    addu r1,r6,r7 / addu r8,r9,r10): the preg given to the first r1 is
//    returned to the free list by the commit of the second write of r1,
//    and by no other commit (the free list itself makes it allocatable
//    from the next cycle, see free_list_tb).
// 4. Random programs; every commit is compared, in order, with a
//    sequential reference model.
// Each mechanism (stalls, bypasses, W-port block, out-of-order issue,
// register freeing) must occur at least once.
module io2l_ptr_core_tb;
  import io2l_pkg::*;
  import io2l_tb_pkg::*;

  localparam int NI = 4;
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
  logic [5:0]  c_preg [NI];
  logic [5:0]  c_ppreg [NI];
  events_t     ev [NI];
  logic [4:0]  arch_ra = '0;
  logic [31:0] arch_rd [NI];
  word_t       st [32];

  io2l_ptr_core dut_a (.clk, .rst, .imem_addr(imem_addr[0]), .imem_data(imem_data[0]),
    .imem_valid(imem_valid[0]), .commit_valid(c_valid[0]), .commit_areg(c_areg[0]),
    .commit_value(c_value[0]), .commit_preg(c_preg[0]), .commit_ppreg(c_ppreg[0]), .arch_raddr(arch_ra), .arch_rdata(arch_rd[0]), .ev(ev[0]));
  io2l_ptr_core #(.NPREG(34)) dut_b (.clk, .rst, .imem_addr(imem_addr[1]), .imem_data(imem_data[1]),
    .imem_valid(imem_valid[1]), .commit_valid(c_valid[1]), .commit_areg(c_areg[1]),
    .commit_value(c_value[1]), .commit_preg(c_preg[1]), .commit_ppreg(c_ppreg[1]), .arch_raddr(arch_ra), .arch_rdata(arch_rd[1]), .ev(ev[1]));
  io2l_ptr_core #(.UNIFIED(1'b1)) dut_u (.clk, .rst, .imem_addr(imem_addr[2]), .imem_data(imem_data[2]),
    .imem_valid(imem_valid[2]), .commit_valid(c_valid[2]), .commit_areg(c_areg[2]),
    .commit_value(c_value[2]), .commit_preg(c_preg[2]), .commit_ppreg(c_ppreg[2]), .arch_raddr(arch_ra), .arch_rdata(arch_rd[2]), .ev(ev[2]));
  io2l_ptr_core #(.ROB_DEPTH(8)) dut_r (.clk, .rst, .imem_addr(imem_addr[3]), .imem_data(imem_data[3]),
    .imem_valid(imem_valid[3]), .commit_valid(c_valid[3]), .commit_areg(c_areg[3]),
    .commit_value(c_value[3]), .commit_preg(c_preg[3]), .commit_ppreg(c_ppreg[3]), .arch_raddr(arch_ra), .arch_rdata(arch_rd[3]), .ev(ev[3]));

  always_comb
    for (int i = 0; i < NI; i++) begin
      imem_valid[i] = (imem_addr[i][31:2] < 30'(prog.size()));
      imem_data[i]  = imem_valid[i] ? prog[imem_addr[i][31:2]] : '0;
    end

  int checks = 0, failures = 0;
  int cyc = 0, total_cyc = 0;
  int n_commit [NI];
  int commit_cyc[$], issue_cyc[$], ooo_cyc[$], wblock_cyc[$];
  int commit_pregs[$], commit_ppregs[$];
  int cnt_stall_iq = 0, cnt_stall_rob = 0, cnt_stall_fl = 0, cnt_wblock = 0;
  int cnt_byp_x = 0, cnt_byp_y = 0, cnt_byp_w = 0, cnt_ooo = 0, cnt_free = 0;

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
      end
      if (c_valid[0]) begin
        commit_cyc.push_back(cyc);
        commit_pregs.push_back(int'(c_preg[0]));
        commit_ppregs.push_back(int'(c_ppreg[0]));
      end
      if (ev[0].issue)      issue_cyc.push_back(cyc);
      if (ev[0].issue_ooo)  ooo_cyc.push_back(cyc);
      if (ev[0].wport_block) wblock_cyc.push_back(cyc);
    end
  end

  // register-freeing example bookkeeping (instance A): the ppreg returned
  // by each commit, in order
  bit        free_watch = 1'b0;
  logic [5:0] fw_preg[$], fw_ppreg[$];
  always @(posedge clk) if (!rst && free_watch && c_valid[0]) begin
    fw_preg.push_back(c_preg[0]);
    fw_ppreg.push_back(c_ppreg[0]);
  end

  task automatic run_prog(input int max_cycles);
    bit done;
    ref_run(prog, exp_areg, exp_val);
    rst = 1'b1;
    for (int i = 0; i < NI; i++) n_commit[i] = 0;
    commit_cyc.delete(); commit_pregs.delete(); commit_ppregs.delete(); issue_cyc.delete(); ooo_cyc.delete(); wblock_cyc.delete();
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
    // names: a..d get the first four free pregs (p31..p34 here, as all 32
    // aregs are mapped at reset) and free r1's p0, r4's p3, r6's p5 and
    // b's preg, the same pattern as the hand trace (p7..p10; p0, p3, p5, p8)
    expect_list("example pregs", commit_pregs, '{31, 32, 33, 34});
    expect_list("example freed ppregs", commit_ppregs, '{0, 3, 5, 32});
    // 2. worked example with values
    prog_example(prog, 1'b1);
    run_prog(100);
    checks++;
    if (exp_val[4] != 2 || exp_val[5] != 8 || exp_val[6] != 9 || exp_val[7] != 6) begin
      failures++;
      $display("FAIL reference model disagrees with the example");
    end
    // 3. register-freeing example
    prog_free_example(prog);
    fw_preg.delete(); fw_ppreg.delete();
    free_watch = 1'b1;
    run_prog(100);
    free_watch = 1'b0;
    checks++;
    // r1 starts in p0; the first write of r1 frees p0, the second write of
    // r1 frees the first write's preg, nothing else frees it
    if (fw_preg.size() != 4 || fw_ppreg[0] != 6'd0 || fw_ppreg[2] != fw_preg[0] ||
        fw_ppreg[1] == fw_preg[0] || fw_ppreg[3] == fw_preg[0]) begin
      failures++;
      $display("FAIL preg freeing: pregs %p ppregs %p", fw_preg, fw_ppreg);
    end
    // 4. random programs
    for (int t = 0; t < 6; t++) begin
      prog_random(prog, 300, (t * 20) % 100);
      run_prog(3000);
    end
    $display("events: stall_iq=%0d stall_rob=%0d stall_fl=%0d wport_block=%0d byp_x=%0d byp_y=%0d byp_w=%0d ooo=%0d free=%0d",
             cnt_stall_iq, cnt_stall_rob, cnt_stall_fl, cnt_wblock, cnt_byp_x, cnt_byp_y,
             cnt_byp_w, cnt_ooo, cnt_free);
    begin
      int cnts [9];
      cnts = '{cnt_stall_iq, cnt_stall_rob, cnt_stall_fl, cnt_wblock, cnt_byp_x,
               cnt_byp_y, cnt_byp_w, cnt_ooo, cnt_free};
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
