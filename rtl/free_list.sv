// free_list: the free list (FL) of the pointer-based renaming scheme.
//
// One "free" bit per physical register. The D stage allocates the free
// preg with the lowest number (a priority encoder, as in the source
// material); the C stage returns the previous preg (ppreg) of a committing
// instruction. Allocation and freeing may happen in the same cycle; a preg
// freed in cycle t can be allocated from cycle t+1 on.
//
// Reset: pregs [FIRST_FREE, NPREG-2] are free; the rest hold the initial
// architectural mapping (see rename_table). This reset split is a choice
// of this design that reproduces the worked example (p7..p10 free).
//
// Interface: alloc_req/alloc_preg/empty are combinational from the state;
// the bit vector updates at the clock edge.
module free_list #(
  parameter int unsigned NPREG      = 64,
  parameter int unsigned FIRST_FREE = 31,
  localparam int unsigned PW = $clog2(NPREG)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          alloc_req,   // D takes alloc_preg this cycle
  output logic          empty,
  output logic [PW-1:0] alloc_preg,
  input  logic          free_req,    // C returns free_preg this cycle
  input  logic [PW-1:0] free_preg,
  output logic [NPREG-1:0] free_bits
);

  logic [NPREG-1:0] free_q;

  always_comb begin
    empty      = 1'b1;
    alloc_preg = '0;
    for (int i = NPREG - 1; i >= 0; i--) begin
      if (free_q[i]) begin
        empty      = 1'b0;
        alloc_preg = PW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NPREG; i++)
        free_q[i] <= (i >= FIRST_FREE) && (i < NPREG - 1);
    end else begin
      if (alloc_req && !empty) free_q[alloc_preg] <= 1'b0;
      if (free_req)            free_q[free_preg]  <= 1'b1;
    end
  end

  assign free_bits = free_q;

  // a freed preg must be allocated, and alloc only when not empty
  always_ff @(posedge clk) if (!rst) begin
    assert (!(alloc_req && empty)) else $error("free_list: allocate while empty");
    assert (!(free_req && free_q[free_preg])) else $error("free_list: double free");
  end

endmodule
