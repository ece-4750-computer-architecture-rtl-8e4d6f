// scoreboard: the scoreboard (SB) of the I stage, indexed by physical
// register (pointer scheme) or ROB entry number (value scheme).
//
// Per tag it keeps: pend (a write to this tag is in flight; set when D
// allocates the tag, cleared when W writes it back), iss (the producer has
// issued) and cnt (cycles until the producer's result leaves X or Y3).
// byp_ready[tag] says the producer's result can be bypassed into I this
// cycle: from the end of X or Y3, or from W. After W the value sits in the
// PRF/ROB and the IQ pending bit is already clear.
//
// It also reserves the single W port: res[j] marks W busy j cycles ahead.
// A mul issued in cycle t writes back in t+5, an addu/addiu in t+2, so an
// addu/addiu may not issue while res[2] is set (wport_busy_alu). A mul can
// never collide, since a later ALU op always checks first.
//
// All updates happen at the clock edge; outputs are functions of state.
// The per-tag counter form of the scoreboard is this design's choice; the
// source material only states that the SB is indexed by preg.
module scoreboard #(
  parameter int unsigned TAGW = 6,
  localparam int unsigned NTAG = 1 << TAGW
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            alloc_valid,
  input  logic [TAGW-1:0] alloc_tag,
  input  logic            issue_valid,
  input  logic [TAGW-1:0] issue_tag,
  input  logic            issue_mul,
  input  logic            wb_valid,
  input  logic [TAGW-1:0] wb_tag,
  output logic [NTAG-1:0] byp_ready,
  output logic [NTAG-1:0] pending,
  output logic            wport_busy_alu
);
  import io2l_pkg::*;

  logic [NTAG-1:0] pend_q, iss_q;
  logic [2:0]      cnt_q [NTAG];
  logic [5:1]      res_q;

  always_comb
    for (int i = 0; i < NTAG; i++)
      byp_ready[i] = pend_q[i] && iss_q[i] && cnt_q[i] == 3'd0;

  assign pending        = pend_q;
  assign wport_busy_alu = res_q[LAT_X + 1];

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_q <= '0;
      iss_q  <= '0;
      res_q  <= '0;
      for (int i = 0; i < NTAG; i++) cnt_q[i] <= '0;
    end else begin
      for (int i = 0; i < NTAG; i++)
        if (cnt_q[i] != 3'd0) cnt_q[i] <= cnt_q[i] - 3'd1;
      res_q <= {1'b0, res_q[5:2]};
      if (issue_valid) begin
        iss_q[issue_tag] <= 1'b1;
        cnt_q[issue_tag] <= issue_mul ? 3'(LAT_Y - 1) : 3'(LAT_X - 1);
        if (issue_mul) res_q[LAT_Y] <= 1'b1;
        else           res_q[LAT_X] <= 1'b1;
      end
      if (wb_valid) pend_q[wb_tag] <= 1'b0;
      if (alloc_valid) begin
        pend_q[alloc_tag] <= 1'b1;
        iss_q[alloc_tag]  <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) if (!rst) begin
    assert (!(issue_valid && !issue_mul && res_q[LAT_X + 1]))
      else $error("scoreboard: W port conflict");
  end

endmodule
