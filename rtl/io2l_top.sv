// io2l_top: the three register-renaming processors side by side.
//
//   u_ptr  pointer-based renaming with separate PRF and ARF
//   u_urf  pointer-based renaming with a unified register file (URF) and
//          an architectural rename table (ART)
//   u_val  value-based renaming, future values held in the ROB
// All three execute the same instruction set (addu, addiu, mul) with the
// same F D I X/Y0-Y3 W C pipeline and differ only in where renamed values
// live. They share clock and reset; each has its own instruction port,
// commit port and event pulses (see io2l_ptr_core for the port timing).
module io2l_top #(
  parameter int unsigned NPREG     = 64,
  parameter int unsigned IQ_DEPTH  = 4,
  parameter int unsigned ROB_DEPTH = 4,
  localparam int unsigned PW   = $clog2(NPREG),
  localparam int unsigned ROBW = (ROB_DEPTH > 1) ? $clog2(ROB_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst,
  // pointer-based, PRF + ARF
  output logic [31:0]       ptr_imem_addr,
  input  logic [31:0]       ptr_imem_data,
  input  logic              ptr_imem_valid,
  output logic              ptr_commit_valid,
  output logic [4:0]        ptr_commit_areg,
  output logic [31:0]       ptr_commit_value,
  output logic [PW-1:0]     ptr_commit_preg,
  output logic [PW-1:0]     ptr_commit_ppreg,
  input  logic [4:0]        ptr_arch_raddr,
  output logic [31:0]       ptr_arch_rdata,
  output io2l_pkg::events_t ptr_ev,
  // pointer-based, URF + ART
  output logic [31:0]       urf_imem_addr,
  input  logic [31:0]       urf_imem_data,
  input  logic              urf_imem_valid,
  output logic              urf_commit_valid,
  output logic [4:0]        urf_commit_areg,
  output logic [31:0]       urf_commit_value,
  output logic [PW-1:0]     urf_commit_preg,
  output logic [PW-1:0]     urf_commit_ppreg,
  input  logic [4:0]        urf_arch_raddr,
  output logic [31:0]       urf_arch_rdata,
  output io2l_pkg::events_t urf_ev,
  // value-based
  output logic [31:0]       val_imem_addr,
  input  logic [31:0]       val_imem_data,
  input  logic              val_imem_valid,
  output logic              val_commit_valid,
  output logic [4:0]        val_commit_areg,
  output logic [31:0]       val_commit_value,
  output logic [ROBW-1:0]   val_commit_rob,
  input  logic [4:0]        val_arch_raddr,
  output logic [31:0]       val_arch_rdata,
  output io2l_pkg::events_t val_ev
);

  io2l_ptr_core #(.NPREG(NPREG), .IQ_DEPTH(IQ_DEPTH), .ROB_DEPTH(ROB_DEPTH), .UNIFIED(1'b0)) u_ptr (
    .clk, .rst,
    .imem_addr(ptr_imem_addr), .imem_data(ptr_imem_data), .imem_valid(ptr_imem_valid),
    .commit_valid(ptr_commit_valid), .commit_areg(ptr_commit_areg),
    .commit_value(ptr_commit_value), .commit_preg(ptr_commit_preg),
    .commit_ppreg(ptr_commit_ppreg), .arch_raddr(ptr_arch_raddr), .arch_rdata(ptr_arch_rdata), .ev(ptr_ev)
  );

  io2l_ptr_core #(.NPREG(NPREG), .IQ_DEPTH(IQ_DEPTH), .ROB_DEPTH(ROB_DEPTH), .UNIFIED(1'b1)) u_urf (
    .clk, .rst,
    .imem_addr(urf_imem_addr), .imem_data(urf_imem_data), .imem_valid(urf_imem_valid),
    .commit_valid(urf_commit_valid), .commit_areg(urf_commit_areg),
    .commit_value(urf_commit_value), .commit_preg(urf_commit_preg),
    .commit_ppreg(urf_commit_ppreg), .arch_raddr(urf_arch_raddr), .arch_rdata(urf_arch_rdata), .ev(urf_ev)
  );

  io2l_val_core #(.IQ_DEPTH(IQ_DEPTH), .ROB_DEPTH(ROB_DEPTH)) u_val (
    .clk, .rst,
    .imem_addr(val_imem_addr), .imem_data(val_imem_data), .imem_valid(val_imem_valid),
    .commit_valid(val_commit_valid), .commit_areg(val_commit_areg),
    .commit_value(val_commit_value), .commit_rob(val_commit_rob), .arch_raddr(val_arch_raddr), .arch_rdata(val_arch_rdata), .ev(val_ev)
  );

endmodule
