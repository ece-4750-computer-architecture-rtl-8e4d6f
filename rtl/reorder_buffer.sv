// reorder_buffer: the reorder buffer (ROB) of both renaming schemes.
//
// A circular buffer of DEPTH entries, each with a valid bit v, a pending
// bit p (result not yet written back), the destination areg and a data
// field. The pointer scheme stores {preg, ppreg} in the data field at
// allocation; the value scheme stores the result value there at writeback
// (WB_WRITES_DATA=1), so that its entry number serves as the preg.
//
//   D: alloc_valid writes a new entry at the tail (alloc_id), p=1.
//   W: wb_valid clears p of entry wb_id and, in the value scheme, writes
//      wb_data. wb_areg gives that entry's areg, for the RT update in W.
//   C: the head entry commits as soon as it is valid and not pending
//      (commit_valid); it is released at the same clock edge. At most one
//      commit per cycle, in program order.
// Two combinational read ports (rd_id -> rd_p, rd_data) let the value
// scheme read completed results in D. Alloc and commit in the same cycle
// are allowed; alloc is accepted only when not full. A W write in cycle t
// makes the entry commit-able in cycle t+1.
module reorder_buffer #(
  parameter int unsigned DEPTH          = 4,
  parameter int unsigned DW             = 12,
  parameter bit          WB_WRITES_DATA = 1'b0,
  localparam int unsigned ROBW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            alloc_valid,
  input  logic [4:0]      alloc_areg,
  input  logic [DW-1:0]   alloc_data,
  output logic [ROBW-1:0] alloc_id,
  output logic            full,
  input  logic            wb_valid,
  input  logic [ROBW-1:0] wb_id,
  input  logic [DW-1:0]   wb_data,
  output logic [4:0]      wb_areg,
  output logic            commit_valid,
  output logic [ROBW-1:0] commit_id,
  output logic [4:0]      commit_areg,
  output logic [DW-1:0]   commit_data,
  input  logic [ROBW-1:0] rd_id   [2],
  output logic            rd_p    [2],
  output logic [DW-1:0]   rd_data [2]
);

  logic [DEPTH-1:0] v_q, p_q;
  logic [4:0]       areg_q [DEPTH];
  logic [DW-1:0]    data_q [DEPTH];
  logic [ROBW-1:0]  head_q, tail_q;

  assign full         = v_q[tail_q];
  assign alloc_id     = tail_q;
  assign commit_id    = head_q;
  assign wb_areg      = areg_q[wb_id];
  assign commit_valid = v_q[head_q] && !p_q[head_q];
  assign commit_areg  = areg_q[head_q];
  assign commit_data  = data_q[head_q];

  always_comb
    for (int k = 0; k < 2; k++) begin
      rd_p[k]    = p_q[rd_id[k]];
      rd_data[k] = data_q[rd_id[k]];
    end

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q    <= '0;
      p_q    <= '0;
      head_q <= '0;
      tail_q <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        areg_q[i] <= '0;
        data_q[i] <= '0;
      end
    end else begin
      if (wb_valid) begin
        p_q[wb_id] <= 1'b0;
        if (WB_WRITES_DATA) data_q[wb_id] <= wb_data;
      end
      if (commit_valid) begin
        v_q[head_q] <= 1'b0;
        head_q      <= ROBW'((int'(head_q) + 1) % DEPTH);
      end
      if (alloc_valid && !full) begin
        v_q[tail_q]    <= 1'b1;
        p_q[tail_q]    <= 1'b1;
        areg_q[tail_q] <= alloc_areg;
        data_q[tail_q] <= alloc_data;
        tail_q         <= ROBW'((int'(tail_q) + 1) % DEPTH);
      end
    end
  end

  always_ff @(posedge clk) if (!rst) begin
    assert (!(alloc_valid && full)) else $error("reorder_buffer: alloc while full");
    assert (!(wb_valid && !(v_q[wb_id] && p_q[wb_id]))) else $error("reorder_buffer: bad writeback");
  end

endmodule
