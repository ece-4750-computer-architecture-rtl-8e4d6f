// io2l_ptr_core: single-issue IO2L processor with pointer-based register
// renaming.
//
// Pipeline: F | D | I | X or Y0..Y3 | W | C.
//   F  fetches one instruction per cycle from imem (pc += 4; the three
//      supported instructions never redirect the pc).
//   D  decodes, looks up both sources in the rename table (RT), takes a
//      new preg from the free list (FL), renames the destination, and
//      allocates an issue queue (IQ) entry holding preg specifiers and a
//      reorder buffer (ROB) entry {preg, areg, ppreg}. D stalls when the
//      IQ or ROB is full or the FL is empty.
//   I  issues the oldest ready IQ entry; operands come from the physical
//      register file (PRF) or are bypassed from the end of X, the end of
//      Y3 or from W. Values live only in the PRF and the bypass network.
//   W  writes the PRF, clears the RT pending bit (if the areg still maps to
//      this preg), the scoreboard entry, the IQ pending bits and the ROB
//      pending bit.
//   C  commits the ROB head in order: copies PRF[preg] into ARF[areg] and
//      returns ppreg to the FL (a preg is free only once the next writer
//      of the same areg commits, so no read of it is still in flight).
// UNIFIED=1 builds the unified variant: the PRF becomes the unified
// register file (URF, holding architectural and future values) and the
// ARF is replaced by an architectural rename table (ART); C then copies the
// preg pointer into ART[areg] instead of copying a value.
//
// Timing (matches the worked example): a mul decoded in cycle t issues at
// t+1 at the earliest, is in W at t+6 and commits at t+7; a dependent
// instruction can issue in the cycle its producer is in Y3 (or X).
// Interface: imem_addr/imem_data/imem_valid is a combinational instruction
// port (imem_valid low means no instruction at that address, F waits);
// commit_* reports every committed instruction with its result, its preg
// and the ppreg it returns to the free list in that cycle; arch_raddr ->
// arch_rdata reads the committed architectural state combinationally (ARF,
// or URF through the ART), e.g. after a program has drained; ev gives
// one pulse per mechanism per cycle. Synchronous active-high reset.
// Sizes (64 pregs, 32 aregs, 4 IQ and 4 ROB entries) follow the figures;
// selection policy, reset mapping and the instruction encoding are this
// design's choices. Illegal instruction words are dropped in D.
module io2l_ptr_core #(
  parameter int unsigned NPREG     = 64,
  parameter int unsigned IQ_DEPTH  = 4,
  parameter int unsigned ROB_DEPTH = 4,
  parameter bit          UNIFIED   = 1'b0,
  localparam int unsigned PW   = $clog2(NPREG),
  localparam int unsigned ROBW = (ROB_DEPTH > 1) ? $clog2(ROB_DEPTH) : 1,
  // PRF read ports: two in I, one in C, plus the architectural read of
  // the unified variant
  localparam int unsigned RF_NRD = UNIFIED ? 4 : 3
) (
  input  logic                clk,
  input  logic                rst,
  output logic [31:0]         imem_addr,
  input  logic [31:0]         imem_data,
  input  logic                imem_valid,
  output logic                commit_valid,
  output logic [4:0]          commit_areg,
  output logic [31:0]         commit_value,
  output logic [PW-1:0]       commit_preg,
  output logic [PW-1:0]       commit_ppreg,
  input  logic [4:0]          arch_raddr,
  output logic [31:0]         arch_rdata,
  output io2l_pkg::events_t   ev
);
  import io2l_pkg::*;

  // ---------------- F ----------------
  logic [31:0] pc_q, fd_inst_q;
  logic        fd_valid_q;
  dec_t        dec;
  logic        d_go, d_take;
  logic        iq_full, rob_full, fl_empty;

  assign imem_addr = pc_q;

  inst_decoder u_dec (.inst(fd_inst_q), .dec);

  assign d_go      = fd_valid_q && dec.legal && !iq_full && !rob_full && !fl_empty;
  // the F/D register takes a new instruction when D is empty or moves on
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
  logic          rt_v [2], rt_p [2];
  logic [PW-1:0] rt_preg [2];
  logic [4:0]    rt_rs [2];
  logic [PW-1:0] old_preg, new_preg;
  logic          iq_sv [2], iq_sp [2];
  logic [PW-1:0] iq_src [2];
  logic [ROBW-1:0] rob_tail;

  // W stage signals
  logic          w_valid;
  logic [PW-1:0] w_tag;
  logic [ROBW-1:0] w_rob;
  logic [4:0]    w_areg;
  logic [31:0]   w_value;
  // C stage signals
  logic          c_valid;
  logic [ROBW-1:0] c_id;
  logic [4:0]    c_areg;
  logic [2*PW-1:0] c_data;
  logic [PW-1:0] c_preg, c_ppreg;

  assign rt_rs[0] = dec.rs;
  assign rt_rs[1] = dec.rt;

  rename_table #(.NPREG(NPREG), .VALUE_BASED(1'b0)) u_rt (
    .clk, .rst,
    .rs_areg(rt_rs), .rs_v(rt_v), .rs_p(rt_p), .rs_preg(rt_preg),
    .rd_areg(dec.rd), .rd_old_preg(old_preg),
    .d_we(d_go), .d_areg(dec.rd), .d_preg(new_preg),
    .w_we(w_valid), .w_areg(w_areg), .w_preg(w_tag),
    .c_we(1'b0), .c_areg('0), .c_preg('0)
  );

  free_list #(.NPREG(NPREG), .FIRST_FREE(31)) u_fl (
    .clk, .rst,
    .alloc_req(d_go), .empty(fl_empty), .alloc_preg(new_preg),
    .free_req(c_valid), .free_preg(c_ppreg), .free_bits()
  );

  always_comb begin
    iq_sv[0]  = 1'b1;
    iq_sv[1]  = dec.has_rt;
    for (int k = 0; k < 2; k++) begin
      iq_sp[k]  = iq_sv[k] && rt_p[k];
      iq_src[k] = rt_preg[k];
    end
  end

  // ---------------- I ----------------
  logic [(1<<PW)-1:0] byp_ready;
  logic          wport_busy_alu;
  logic          iss_valid, iss_ooo, wport_block;
  op_e           iss_op;
  logic [31:0]   iss_imm;
  logic [PW-1:0] iss_dest;
  logic [ROBW-1:0] iss_rob;
  logic          iss_sv [2], iss_sp [2];
  logic [PW-1:0] iss_src [2];
  logic [31:0]   opnd [2];
  logic [2:0]    byp_kind [2];   // {w, y, x}
  logic          x_valid, y3_valid;
  logic [PW-1:0] x_tag, y3_tag;
  logic [31:0]   x_out, y3_out;
  logic [PW-1:0] rf_raddr [RF_NRD];
  logic [31:0]   rf_rdata [RF_NRD];

  issue_queue #(.DEPTH(IQ_DEPTH), .TAGW(PW), .ROBW(ROBW), .CAPTURE_VALUE(1'b0)) u_iq (
    .clk, .rst,
    .ins_valid(d_go), .ins_op(dec.op), .ins_imm(dec.imm), .ins_dest(new_preg),
    .ins_rob(rob_tail), .ins_src_v(iq_sv), .ins_src_p(iq_sp), .ins_src(iq_src),
    .full(iq_full),
    .wake_valid(w_valid), .wake_tag(w_tag), .wake_value(w_value),
    .byp_ready, .wport_busy_alu,
    .iss_valid, .iss_op, .iss_imm, .iss_dest, .iss_rob,
    .iss_src_v(iss_sv), .iss_src_p(iss_sp), .iss_src,
    .iss_ooo, .wport_block
  );

  scoreboard #(.TAGW(PW)) u_sb (
    .clk, .rst,
    .alloc_valid(d_go), .alloc_tag(new_preg),
    .issue_valid(iss_valid), .issue_tag(iss_dest), .issue_mul(iss_op == OP_MUL),
    .wb_valid(w_valid), .wb_tag(w_tag),
    .byp_ready, .pending(), .wport_busy_alu
  );

  assign rf_raddr[0] = iss_src[0];
  assign rf_raddr[1] = iss_src[1];
  assign rf_raddr[2] = c_preg;

  // PRF (or URF when UNIFIED): read in I (two ports) and C, written in W
  regfile #(.NREG(NPREG), .W(32), .NRD(RF_NRD)) u_prf (
    .clk, .rst, .raddr(rf_raddr), .rdata(rf_rdata),
    .we(w_valid), .waddr(w_tag), .wdata(w_value)
  );

  // bypass network into I
  always_comb begin
    for (int k = 0; k < 2; k++) begin
      byp_kind[k] = 3'b000;
      if (!iss_sv[k])                                   opnd[k] = '0;
      else if (iss_sp[k] && x_valid  && x_tag  == iss_src[k]) begin opnd[k] = x_out;   byp_kind[k] = 3'b001; end
      else if (iss_sp[k] && y3_valid && y3_tag == iss_src[k]) begin opnd[k] = y3_out;  byp_kind[k] = 3'b010; end
      else if (iss_sp[k] && w_valid  && w_tag  == iss_src[k]) begin opnd[k] = w_value; byp_kind[k] = 3'b100; end
      else                                              opnd[k] = rf_rdata[k];
    end
  end

  // ---------------- X / Y0..Y3 / W ----------------
  exec_pipes #(.TAGW(PW), .ROBW(ROBW)) u_ex (
    .clk, .rst,
    .iss_valid, .iss_op, .iss_a(opnd[0]),
    .iss_b(iss_op == OP_ADDIU ? iss_imm : opnd[1]),
    .iss_tag(iss_dest), .iss_rob,
    .x_valid, .x_tag, .x_out, .y3_valid, .y3_tag, .y3_out,
    .w_valid, .w_tag, .w_rob, .w_value
  );

  // ---------------- ROB / C ----------------
  reorder_buffer #(.DEPTH(ROB_DEPTH), .DW(2*PW), .WB_WRITES_DATA(1'b0)) u_rob (
    .clk, .rst,
    .alloc_valid(d_go), .alloc_areg(dec.rd), .alloc_data({new_preg, old_preg}),
    .alloc_id(rob_tail), .full(rob_full),
    .wb_valid(w_valid), .wb_id(w_rob), .wb_data('0), .wb_areg(w_areg),
    .commit_valid(c_valid), .commit_id(c_id), .commit_areg(c_areg), .commit_data(c_data),
    .rd_id('{default: '0}), .rd_p(), .rd_data()
  );

  assign {c_preg, c_ppreg} = c_data;

  if (UNIFIED) begin : g_art
    // ART: areg -> committed preg; C copies the pointer, not the value
    logic [PW-1:0] arch_preg;
    arch_rename_table #(.NPREG(NPREG)) u_art (
      .clk, .rst,
      .c_we(c_valid), .c_areg(c_areg), .c_preg(c_preg),
      .rd_areg(arch_raddr), .rd_preg(arch_preg)
    );
    assign rf_raddr[RF_NRD-1] = arch_preg;
    assign arch_rdata         = rf_rdata[RF_NRD-1];
  end else begin : g_arf
    // ARF: C copies the committed value out of the PRF
    logic [4:0]  arf_ra [1];
    logic [31:0] arf_rd [1];
    assign arf_ra[0] = arch_raddr;
    regfile #(.NREG(32), .W(32), .NRD(1)) u_arf (
      .clk, .rst, .raddr(arf_ra), .rdata(arf_rd),
      .we(c_valid), .waddr(c_areg), .wdata(rf_rdata[2])
    );
    assign arch_rdata = arf_rd[0];
  end

  assign commit_valid = c_valid;
  assign commit_areg  = c_areg;
  assign commit_value = rf_rdata[2];
  assign commit_preg  = c_preg;
  assign commit_ppreg = c_ppreg;

  // ---------------- events ----------------
  always_comb begin
    ev             = '0;
    ev.commit      = c_valid;
    ev.issue       = iss_valid;
    ev.issue_ooo   = iss_ooo;
    ev.stall_iq    = fd_valid_q && dec.legal && iq_full;
    ev.stall_rob   = fd_valid_q && dec.legal && rob_full;
    ev.stall_fl    = fd_valid_q && dec.legal && fl_empty;
    ev.wport_block = wport_block;
    ev.byp_x       = iss_valid && (byp_kind[0][0] || byp_kind[1][0]);
    ev.byp_y       = iss_valid && (byp_kind[0][1] || byp_kind[1][1]);
    ev.byp_w       = iss_valid && (byp_kind[0][2] || byp_kind[1][2]);
    ev.preg_free   = c_valid;
    ev.rt_clear    = w_valid;
  end

  // a committing instruction's value must be in the PRF already
  always_ff @(posedge clk) if (!rst)
    assert (!(c_valid && w_valid && w_tag == c_preg)) else $error("io2l_ptr_core: commit before writeback");

endmodule
