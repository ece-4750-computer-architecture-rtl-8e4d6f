// exec_pipes: the execution stages between I and W.
//
// X is a one-cycle integer unit for addu and addiu. Y0..Y3 is a four-stage
// pipelined multiplier for mul: the 32x32 product (low 32 bits) is formed
// in Y0 and carried through Y1..Y3, so a mul issued in cycle t has its
// result at the end of Y3 in cycle t+4 and is in W in cycle t+5; an
// addu/addiu is in X in t+1 and in W in t+2. Both pipes feed one W stage
// register. The issue logic guarantees that X and Y3 never hand over in
// the same cycle (asserted here).
//
// Each operation carries its destination tag (preg or ROB entry number),
// and its ROB entry number. x_out/y3_out expose the
// results at the end of X and Y3 for bypassing into I; w_* is the W stage.
// Where the multiply is done inside Y0..Y3 is this design's choice.
module exec_pipes #(
  parameter int unsigned TAGW = 6,
  parameter int unsigned ROBW = 2
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            iss_valid,
  input  io2l_pkg::op_e   iss_op,
  input  logic [31:0]     iss_a,
  input  logic [31:0]     iss_b,
  input  logic [TAGW-1:0] iss_tag,
  input  logic [ROBW-1:0] iss_rob,
  // end of X and end of Y3 (bypass sources)
  output logic            x_valid,
  output logic [TAGW-1:0] x_tag,
  output logic [31:0]     x_out,
  output logic            y3_valid,
  output logic [TAGW-1:0] y3_tag,
  output logic [31:0]     y3_out,
  // W stage
  output logic            w_valid,
  output logic [TAGW-1:0] w_tag,
  output logic [ROBW-1:0] w_rob,
  output logic [31:0]     w_value
);
  import io2l_pkg::*;

  typedef struct packed {
    logic            v;
    logic [TAGW-1:0] tag;
    logic [ROBW-1:0] rob;
    logic [31:0]     a;   // X: operands; Y: a holds the product
    logic [31:0]     b;
  } op_t;

  op_t x_q, y_q [4], w_q;
  op_t in;
  logic [31:0] prod;   // low half of the product

  always_comb begin
    in.v    = 1'b0;
    in.tag  = iss_tag;
    in.rob  = iss_rob;
    in.a    = iss_a;
    in.b    = iss_b;
    prod    = iss_a * iss_b;
  end

  assign x_valid  = x_q.v;
  assign x_tag    = x_q.tag;
  assign x_out    = x_q.a + x_q.b;
  assign y3_valid = y_q[3].v;
  assign y3_tag   = y_q[3].tag;
  assign y3_out   = y_q[3].a;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_q <= '0;
      w_q <= '0;
      for (int i = 0; i < 4; i++) y_q[i] <= '0;
    end else begin
      x_q   <= in;
      x_q.v <= iss_valid && iss_op != OP_MUL;
      y_q[0]   <= in;
      y_q[0].a <= prod;
      y_q[0].v <= iss_valid && iss_op == OP_MUL;
      for (int i = 1; i < 4; i++) y_q[i] <= y_q[i-1];
      if (x_q.v) begin
        w_q   <= x_q;
        w_q.a <= x_out;
      end else begin
        w_q <= y_q[3];
      end
    end
  end

  assign w_valid = w_q.v;
  assign w_tag   = w_q.tag;
  assign w_rob   = w_q.rob;
  assign w_value = w_q.a;

  always_ff @(posedge clk) if (!rst)
    assert (!(x_q.v && y_q[3].v)) else $error("exec_pipes: X and Y3 both reach W");

endmodule
