// issue_queue: the issue queue (IQ) shared by both renaming schemes.
//
// Each entry holds op, an optional immediate, the destination tag, the ROB
// entry number and two sources, each with a valid bit v, a pending bit p
// and a field src. In the pointer scheme (CAPTURE_VALUE=0) src is always a
// preg. In the value scheme (CAPTURE_VALUE=1) src is a ROB entry number
// while p is set and the operand value once p is clear.
//
// Wakeup: when W writes back tag wake_tag, every matching pending source
// clears p (and, in the value scheme, captures wake_value). An entry
// inserted in the same cycle is matched too, so no wakeup is lost.
//
// Select: the entries are kept in age order (a collapsing queue, entry 0
// oldest). An entry is ready when each source is unused, not pending, or
// marked bypassable by the scoreboard (byp_ready[tag]). The oldest ready
// entry issues; an addu/addiu is held back while wport_busy_alu says the
// single W port is taken two cycles ahead. Issue is combinational from the
// state; the entry leaves at the clock edge. At most one insert and one
// issue per cycle; the queue accepts an insert only when not full.
// Oldest-first selection and the collapsing organisation are this
// design's choices; the depth of 4 follows the worked examples.
module issue_queue #(
  parameter int unsigned DEPTH         = 4,
  parameter int unsigned TAGW          = 6,
  parameter int unsigned ROBW          = 2,
  parameter bit          CAPTURE_VALUE = 1'b0,
  localparam int unsigned SRCW = CAPTURE_VALUE ? ((TAGW > 32) ? TAGW : 32) : TAGW,
  localparam int unsigned NTAG = 1 << TAGW
) (
  input  logic            clk,
  input  logic            rst,
  // insert (D stage)
  input  logic            ins_valid,
  input  io2l_pkg::op_e   ins_op,
  input  logic [31:0]     ins_imm,
  input  logic [TAGW-1:0] ins_dest,
  input  logic [ROBW-1:0] ins_rob,
  input  logic            ins_src_v [2],
  input  logic            ins_src_p [2],
  input  logic [SRCW-1:0] ins_src   [2],
  output logic            full,
  // wakeup (W stage)
  input  logic            wake_valid,
  input  logic [TAGW-1:0] wake_tag,
  input  logic [31:0]     wake_value,
  // readiness from the scoreboard
  input  logic [NTAG-1:0] byp_ready,
  input  logic            wport_busy_alu,
  // issue (I stage)
  output logic            iss_valid,
  output io2l_pkg::op_e   iss_op,
  output logic [31:0]     iss_imm,
  output logic [TAGW-1:0] iss_dest,
  output logic [ROBW-1:0] iss_rob,
  output logic            iss_src_v [2],
  output logic            iss_src_p [2],
  output logic [SRCW-1:0] iss_src   [2],
  output logic            iss_ooo,       // issued entry was not the oldest
  output logic            wport_block    // a ready ALU op waited for the W port
);
  import io2l_pkg::*;

  typedef struct packed {
    logic            v;
    op_e             op;
    logic [31:0]     imm;
    logic [TAGW-1:0] dest;
    logic [ROBW-1:0] rob;
    logic [1:0]      sv;
    logic [1:0]      sp;
    logic [1:0][SRCW-1:0] src;
  } entry_t;

  entry_t q [DEPTH];
  entry_t q_n [DEPTH];
  entry_t ins_e;
  logic [DEPTH-1:0] rdy, rdy_ops;
  int unsigned sel;
  int unsigned count;

  function automatic entry_t wake(entry_t e);
    for (int k = 0; k < 2; k++) begin
      if (wake_valid && e.sv[k] && e.sp[k] && e.src[k][TAGW-1:0] == wake_tag) begin
        e.sp[k] = 1'b0;
        if (CAPTURE_VALUE) e.src[k] = SRCW'(wake_value);
      end
    end
    return e;
  endfunction

  always_comb begin
    count = 0;
    for (int i = 0; i < DEPTH; i++) if (q[i].v) count++;
    full = (count == DEPTH);
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      rdy_ops[i] = q[i].v;
      for (int k = 0; k < 2; k++)
        if (q[i].sv[k] && q[i].sp[k] && !byp_ready[q[i].src[k][TAGW-1:0]])
          rdy_ops[i] = 1'b0;
      rdy[i] = rdy_ops[i] && !(q[i].op != OP_MUL && wport_busy_alu);
    end
    wport_block = |(rdy_ops & ~rdy);

    sel = DEPTH;
    for (int i = DEPTH - 1; i >= 0; i--) if (rdy[i]) sel = i;
    iss_valid = (sel < DEPTH);
    iss_ooo   = iss_valid && sel != 0;
    begin
      entry_t s;
      s = q[(sel < DEPTH) ? sel : 0];
      iss_op   = s.op;
      iss_imm  = s.imm;
      iss_dest = s.dest;
      iss_rob  = s.rob;
      for (int k = 0; k < 2; k++) begin
        iss_src_v[k] = s.sv[k];
        iss_src_p[k] = s.sp[k];
        iss_src[k]   = s.src[k];
      end
    end

    ins_e.v    = ins_valid && !full;
    ins_e.op   = ins_op;
    ins_e.imm  = ins_imm;
    ins_e.dest = ins_dest;
    ins_e.rob  = ins_rob;
    for (int k = 0; k < 2; k++) begin
      ins_e.sv[k]  = ins_src_v[k];
      ins_e.sp[k]  = ins_src_p[k];
      ins_e.src[k] = ins_src[k];
    end

    // remove the issued entry, close the gap, append the new one
    begin
      int unsigned j;
      j = 0;
      for (int i = 0; i < DEPTH; i++) q_n[i] = '0;
      for (int i = 0; i < DEPTH; i++) begin
        if (q[i].v && !(iss_valid && sel == i)) begin
          q_n[j] = wake(q[i]);
          j++;
        end
      end
      if (ins_e.v && j < DEPTH) q_n[j] = wake(ins_e);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    else     for (int i = 0; i < DEPTH; i++) q[i] <= q_n[i];
  end

  always_ff @(posedge clk) if (!rst)
    assert (!(ins_valid && full)) else $error("issue_queue: insert while full");

endmodule
