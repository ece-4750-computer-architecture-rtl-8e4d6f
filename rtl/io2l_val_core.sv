// io2l_val_core: single-issue IO2L processor with value-based register
// renaming.
//
// Future values are kept in the reorder buffer (ROB) itself, so a
// "physical register" is a ROB entry number and no free list is needed:
// names are allocated and released with the ROB entries.
// Pipeline: F | D | I | X or Y0..Y3 | W | C.
//   D  renames the destination to the ROB tail entry in the rename table
//      (RT: v, p, preg). Each source is resolved once: RT entry not valid
//      -> value from the architectural register file (ARF); valid and not
//      pending -> completed value read from the ROB; valid and pending ->
//      the ROB entry number to wait for. The IQ entry stores either the
//      value (p clear) or the entry number (p set).
//   I  issues the oldest ready IQ entry. Pending sources are bypassed
//      from the end of X, the end of Y3 or from W; the others are already
//      values in the IQ.
//   W  writes the value into the ROB entry, clears the RT pending bit (if
//      still mapped), the scoreboard entry, and wakes IQ entries, which
//      capture the value.
//   C  commits the ROB head in order, copies its value into ARF[areg] and
//      clears the RT valid bit if the areg still maps to that entry.
// Timing is the same as the pointer scheme's (see io2l_ptr_core).
// Interface: as io2l_ptr_core; commit_rob is the committing entry number;
// arch_raddr -> arch_rdata reads the ARF combinationally.
// Sizes (4 IQ entries, 4 ROB entries = 4 names) follow the figures;
// selection policy and instruction encoding are this design's choices.
module io2l_val_core #(
  parameter int unsigned IQ_DEPTH  = 4,
  parameter int unsigned ROB_DEPTH = 4,
  localparam int unsigned ROBW = (ROB_DEPTH > 1) ? $clog2(ROB_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst,
  output logic [31:0]       imem_addr,
  input  logic [31:0]       imem_data,
  input  logic              imem_valid,
  output logic              commit_valid,
  output logic [4:0]        commit_areg,
  output logic [31:0]       commit_value,
  output logic [ROBW-1:0]   commit_rob,
  input  logic [4:0]        arch_raddr,
  output logic [31:0]       arch_rdata,
  output io2l_pkg::events_t ev
);
  import io2l_pkg::*;

  // ---------------- F ----------------
  logic [31:0] pc_q, fd_inst_q;
  logic        fd_valid_q;
  dec_t        dec;
  logic        d_go, d_take;
  logic        iq_full, rob_full;

  assign imem_addr = pc_q;

  inst_decoder u_dec (.inst(fd_inst_q), .dec);

  assign d_go      = fd_valid_q && dec.legal && !iq_full && !rob_full;
  assign d_take    = !fd_valid_q || d_go || !dec.legal;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q       <= '0;
      fd_valid_q <= 1'b0;
      fd_inst_q  <= '0;
    end else if (d_take) begin
      fd_valid_q <= imem_valid;
      fd_inst_q  <= imem_data;
      if (imem_valid) pc_q <= pc_q + 32'd4;
    end
  end

  // ---------------- D ----------------
  logic            rt_v [2], rt_p [2];
  logic [ROBW-1:0] rt_preg [2];
  logic [4:0]      rt_rs [2];
  logic [ROBW-1:0] rob_tail;
  logic            rob_rd_p [2];
  logic [31:0]     rob_rd_data [2];
  logic [31:0]     arf_rdata [2];
  logic            iq_sv [2], iq_sp [2];
  logic [31:0]     iq_src [2];
  logic [1:0]      src_from_arf, src_from_rob;

  logic            w_valid;
  logic [ROBW-1:0] w_tag, w_rob;
  logic [4:0]      w_areg;
  logic [31:0]     w_value;
  logic            c_valid;
  logic [ROBW-1:0] c_id;
  logic [4:0]      c_areg;
  logic [31:0]     c_data;

  assign rt_rs[0] = dec.rs;
  assign rt_rs[1] = dec.rt;

  rename_table #(.NPREG(1 << ROBW), .VALUE_BASED(1'b1)) u_rt (
    .clk, .rst,
    .rs_areg(rt_rs), .rs_v(rt_v), .rs_p(rt_p), .rs_preg(rt_preg),
    .rd_areg(dec.rd), .rd_old_preg(),
    .d_we(d_go), .d_areg(dec.rd), .d_preg(rob_tail),
    .w_we(w_valid), .w_areg(w_areg), .w_preg(w_tag),
    .c_we(c_valid), .c_areg(c_areg), .c_preg(c_id)
  );

  // ARF: read in D (two ports) and by arch_raddr, written in C
  logic [4:0]  arf_ra [3];
  logic [31:0] arf_rd [3];
  assign arf_ra[0]    = rt_rs[0];
  assign arf_ra[1]    = rt_rs[1];
  assign arf_ra[2]    = arch_raddr;
  assign arf_rdata[0] = arf_rd[0];
  assign arf_rdata[1] = arf_rd[1];
  assign arch_rdata   = arf_rd[2];
  regfile #(.NREG(32), .W(32), .NRD(3)) u_arf (
    .clk, .rst, .raddr(arf_ra), .rdata(arf_rd),
    .we(c_valid), .waddr(c_areg), .wdata(c_data)
  );

  always_comb begin
    iq_sv[0] = 1'b1;
    iq_sv[1] = dec.has_rt;
    for (int k = 0; k < 2; k++) begin
      src_from_arf[k] = 1'b0;
      src_from_rob[k] = 1'b0;
      iq_sp[k]        = 1'b0;
      if (!rt_v[k]) begin
        iq_src[k] = arf_rdata[k];
        src_from_arf[k] = iq_sv[k];
      end else if (!rt_p[k]) begin
        iq_src[k] = rob_rd_data[k];
        src_from_rob[k] = iq_sv[k];
      end else begin
        iq_src[k] = 32'(rt_preg[k]);
        iq_sp[k]  = iq_sv[k];
      end
    end
  end

  // ---------------- I ----------------
  logic [(1<<ROBW)-1:0] byp_ready;
  logic            wport_busy_alu;
  logic            iss_valid, iss_ooo, wport_block;
  op_e             iss_op;
  logic [31:0]     iss_imm;
  logic [ROBW-1:0] iss_dest, iss_rob;
  logic            iss_sv [2], iss_sp [2];
  logic [31:0]     iss_src [2];
  logic [31:0]     opnd [2];
  logic [2:0]      byp_kind [2];
  logic            x_valid, y3_valid;
  logic [ROBW-1:0] x_tag, y3_tag;
  logic [31:0]     x_out, y3_out;

  issue_queue #(.DEPTH(IQ_DEPTH), .TAGW(ROBW), .ROBW(ROBW), .CAPTURE_VALUE(1'b1)) u_iq (
    .clk, .rst,
    .ins_valid(d_go), .ins_op(dec.op), .ins_imm(dec.imm), .ins_dest(rob_tail),
    .ins_rob(rob_tail), .ins_src_v(iq_sv), .ins_src_p(iq_sp), .ins_src(iq_src),
    .full(iq_full),
    .wake_valid(w_valid), .wake_tag(w_tag), .wake_value(w_value),
    .byp_ready, .wport_busy_alu,
    .iss_valid, .iss_op, .iss_imm, .iss_dest, .iss_rob,
    .iss_src_v(iss_sv), .iss_src_p(iss_sp), .iss_src,
    .iss_ooo, .wport_block
  );

  scoreboard #(.TAGW(ROBW)) u_sb (
    .clk, .rst,
    .alloc_valid(d_go), .alloc_tag(rob_tail),
    .issue_valid(iss_valid), .issue_tag(iss_dest), .issue_mul(iss_op == OP_MUL),
    .wb_valid(w_valid), .wb_tag(w_tag),
    .byp_ready, .pending(), .wport_busy_alu
  );

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      byp_kind[k] = 3'b000;
      opnd[k]     = iss_src[k];
      if (!iss_sv[k]) opnd[k] = '0;
      else if (iss_sp[k]) begin
        if (x_valid && x_tag == ROBW'(iss_src[k]))        begin opnd[k] = x_out;   byp_kind[k] = 3'b001; end
        else if (y3_valid && y3_tag == ROBW'(iss_src[k])) begin opnd[k] = y3_out;  byp_kind[k] = 3'b010; end
        else                                              begin opnd[k] = w_value; byp_kind[k] = 3'b100; end
      end
    end
  end

  // ---------------- X / Y0..Y3 / W ----------------
  exec_pipes #(.TAGW(ROBW), .ROBW(ROBW)) u_ex (
    .clk, .rst,
    .iss_valid, .iss_op, .iss_a(opnd[0]),
    .iss_b(iss_op == OP_ADDIU ? iss_imm : opnd[1]),
    .iss_tag(iss_dest), .iss_rob,
    .x_valid, .x_tag, .x_out, .y3_valid, .y3_tag, .y3_out,
    .w_valid, .w_tag, .w_rob, .w_value
  );

  // ---------------- ROB / C ----------------
  reorder_buffer #(.DEPTH(ROB_DEPTH), .DW(32), .WB_WRITES_DATA(1'b1)) u_rob (
    .clk, .rst,
    .alloc_valid(d_go), .alloc_areg(dec.rd), .alloc_data('0),
    .alloc_id(rob_tail), .full(rob_full),
    .wb_valid(w_valid), .wb_id(w_rob), .wb_data(w_value), .wb_areg(w_areg),
    .commit_valid(c_valid), .commit_id(c_id), .commit_areg(c_areg), .commit_data(c_data),
    .rd_id(rt_preg), .rd_p(rob_rd_p), .rd_data(rob_rd_data)
  );

  assign commit_valid = c_valid;
  assign commit_areg  = c_areg;
  assign commit_value = c_data;
  assign commit_rob   = c_id;

  always_comb begin
    ev             = '0;
    ev.commit      = c_valid;
    ev.issue       = iss_valid;
    ev.issue_ooo   = iss_ooo;
    ev.stall_iq    = fd_valid_q && dec.legal && iq_full;
    ev.stall_rob   = fd_valid_q && dec.legal && rob_full;
    ev.wport_block = wport_block;
    ev.byp_x       = iss_valid && (byp_kind[0][0] || byp_kind[1][0]);
    ev.byp_y       = iss_valid && (byp_kind[0][1] || byp_kind[1][1]);
    ev.byp_w       = iss_valid && (byp_kind[0][2] || byp_kind[1][2]);
    ev.rob_read    = d_go && (|src_from_rob);
    ev.arf_read    = d_go && (|src_from_arf);
    ev.rt_clear    = w_valid;
  end

  // a source the RT marks completed must be completed in the ROB
  always_ff @(posedge clk) if (!rst)
    for (int k = 0; k < 2; k++)
      assert (!(d_go && src_from_rob[k] && rob_rd_p[k])) else $error("io2l_val_core: RT/ROB mismatch");

endmodule
