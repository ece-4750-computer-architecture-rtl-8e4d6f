// rename_table: the rename table (RT, "map table") of both schemes.
//
// One entry per architectural register: a pending bit p ("is a write to
// this areg in flight?") and the preg the areg maps to. In the value-based
// scheme (VALUE_BASED=1) each entry also has a valid bit v: the entry is
// valid only while its producer is in flight, and the preg is then a ROB
// entry number.
//
// Writes, all at the clock edge:
//   D  (d_we): the destination is renamed: v=1, p=1, preg=d_preg.
//   W  (w_we): the producer of w_preg wrote back; p is cleared if the entry
//              still maps to w_preg (a younger rename may have replaced it).
//   C  (c_we): value scheme only: the producer of c_preg committed; v is
//              cleared if the entry still maps to c_preg.
// A D write to the same areg wins over a W or C update in the same cycle.
// Reads are combinational and see the state before this cycle's writes.
//
// Reset: pointer scheme maps r_i to p_(i-1) for i >= 1 and r0 to the last
// preg, p clear (the worked example starts with r1..r7 in p0..p6); value
// scheme clears every v and p. The reset mapping is this design's choice.
module rename_table #(
  parameter int unsigned NPREG       = 64,
  parameter bit          VALUE_BASED = 1'b0,
  parameter int unsigned NAREG       = 32,
  localparam int unsigned PW = $clog2(NPREG),
  localparam int unsigned AW = $clog2(NAREG)
) (
  input  logic          clk,
  input  logic          rst,
  // two source lookups and the destination's previous mapping
  input  logic [AW-1:0] rs_areg [2],
  output logic          rs_v    [2],
  output logic          rs_p    [2],
  output logic [PW-1:0] rs_preg [2],
  input  logic [AW-1:0] rd_areg,
  output logic [PW-1:0] rd_old_preg,
  // D: rename destination
  input  logic          d_we,
  input  logic [AW-1:0] d_areg,
  input  logic [PW-1:0] d_preg,
  // W: result written back
  input  logic          w_we,
  input  logic [AW-1:0] w_areg,
  input  logic [PW-1:0] w_preg,
  // C: instruction committed (value scheme)
  input  logic          c_we,
  input  logic [AW-1:0] c_areg,
  input  logic [PW-1:0] c_preg
);

  logic [NAREG-1:0] v_q, p_q;
  logic [PW-1:0]    preg_q [NAREG];

  always_comb begin
    for (int k = 0; k < 2; k++) begin
      rs_v[k]    = v_q[rs_areg[k]];
      rs_p[k]    = p_q[rs_areg[k]];
      rs_preg[k] = preg_q[rs_areg[k]];
    end
    rd_old_preg = preg_q[rd_areg];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NAREG; i++) begin
        v_q[i]    <= !VALUE_BASED;
        p_q[i]    <= 1'b0;
        preg_q[i] <= VALUE_BASED ? '0 : (i == 0 ? PW'(NPREG - 1) : PW'(i - 1));
      end
    end else begin
      if (w_we && v_q[w_areg] && preg_q[w_areg] == w_preg)
        p_q[w_areg] <= 1'b0;
      if (VALUE_BASED && c_we && v_q[c_areg] && preg_q[c_areg] == c_preg)
        v_q[c_areg] <= 1'b0;
      if (d_we) begin
        v_q[d_areg]    <= 1'b1;
        p_q[d_areg]    <= 1'b1;
        preg_q[d_areg] <= d_preg;
      end
    end
  end

endmodule
