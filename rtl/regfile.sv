// regfile: a register file with NRD combinational read ports and one
// write port, reset to zero.
//
// Used for every register array of the two processors: the physical
// register file (PRF, read in I and C, written in W), the architectural
// register file (ARF, written in C; read in D by the value scheme), the
// unified register file (URF) and the architectural rename table (ART,
// entries are preg numbers, written in C) of the unified variant.
// A read in the cycle of a write to the same entry returns the old
// contents; the pipeline's bypass network covers that case.
module regfile #(
  parameter int unsigned NREG = 64,
  parameter int unsigned W    = 32,
  parameter int unsigned NRD  = 3,
  localparam int unsigned AW = $clog2(NREG)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] raddr [NRD],
  output logic [W-1:0]  rdata [NRD],
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] mem [NREG];

  always_comb
    for (int k = 0; k < NRD; k++) rdata[k] = mem[raddr[k]];

  always_ff @(posedge clk) begin
    if (rst) for (int i = 0; i < NREG; i++) mem[i] <= '0;
    else if (we) mem[waddr] <= wdata;
  end

endmodule
