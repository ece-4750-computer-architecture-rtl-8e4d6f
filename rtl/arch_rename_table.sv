// arch_rename_table: the architectural rename table (ART) of the unified
// register file variant of the pointer-based scheme.
//
// One entry per architectural register holding the preg that contains its
// committed value. Instead of copying a value into an architectural
// register file, the C stage writes the committing instruction's preg
// pointer here (c_we/c_areg/c_preg, at the clock edge). The read port is
// combinational and returns the committed preg of rd_areg; together with a
// read of the unified register file it gives the architectural state.
// Reset holds the same mapping as the rename table's reset (r_i -> p_(i-1),
// r0 -> the last preg), a choice of this design.
module arch_rename_table #(
  parameter int unsigned NPREG = 64,
  parameter int unsigned NAREG = 32,
  localparam int unsigned PW = $clog2(NPREG),
  localparam int unsigned AW = $clog2(NAREG)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          c_we,
  input  logic [AW-1:0] c_areg,
  input  logic [PW-1:0] c_preg,
  input  logic [AW-1:0] rd_areg,
  output logic [PW-1:0] rd_preg
);

  logic [PW-1:0] map_q [NAREG];

  assign rd_preg = map_q[rd_areg];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NAREG; i++) map_q[i] <= (i == 0) ? PW'(NPREG - 1) : PW'(i - 1);
    end else if (c_we) begin
      map_q[c_areg] <= c_preg;
    end
  end

endmodule
