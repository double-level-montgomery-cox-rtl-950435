// rower: one Rower of the Cox-Rower array, serving modulus m_j of base B
// and modulus m'_j of base B'.
//
// It holds a local memory (address map in cr_pkg) with the Rower's
// precomputed constants, its two modulus descriptions (mu, -m^-1 mod 2^r),
// scratch words and general-purpose registers, all kept in the inner
// Montgomery domain where the reduction needs it. Each cycle the shared
// control word may issue one ALU operation: operand A is read from the
// memory, taken from the broadcast bus or taken from the Cox's k; operand
// B is always a memory word; base_p picks which modulus the ALU reduces
// by. A result whose tag asks for it is written back when it leaves the
// ALU pipeline. A second read port drives this Rower's broadcast output,
// a third serves the host.
//
// The ALU follows the published design; the memory organisation, the
// single write port (write-back before host), and reading the memory
// without a clock edge are this design's own choices.
//
// Timing: an operation issued in cycle t is written back at the end of
// cycle t+ALU_LAT, so it can be read from cycle t+ALU_LAT+1 on. The host
// may write only while no write-back is in flight.
module rower
  import cr_pkg::*;
#(
  parameter int unsigned R     = cr_pkg::R_DEF,
  parameter int unsigned N     = cr_pkg::N_DEF,
  parameter int unsigned NREG  = cr_pkg::NREG_DEF,
  parameter int unsigned DEPTH = cr_pkg::mem_depth(N, NREG)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  rower_ctrl_t   ctrl,
  input  logic [R-1:0]  bcast,     // value on the broadcast bus
  input  logic [R-1:0]  cox_k,     // Cox estimate, zero-extended
  input  logic [AW-1:0] bc_addr,   // word this Rower drives on bc_data
  output logic [R-1:0]  bc_data,
  input  logic          hw_en,     // host write
  input  logic [AW-1:0] hw_addr,
  input  logic [R-1:0]  hw_data,
  input  logic [AW-1:0] hr_addr,   // host read
  output logic [R-1:0]  hr_data
);

  localparam int unsigned DW = $clog2(DEPTH);

  logic [R-1:0] mem [DEPTH];

  function automatic logic [R-1:0] rd(logic [AW-1:0] addr);
    return (int'(addr) < DEPTH) ? mem[addr[DW-1:0]] : '0;
  endfunction

  logic [R-1:0] op_a, op_b, mu, mni;
  always_comb begin
    unique case (ctrl.asrc)
      ASRC_BCAST: op_a = bcast;
      ASRC_COX:   op_a = cox_k;
      default:    op_a = rd(ctrl.a_addr);
    endcase
    op_b = rd(ctrl.b_addr);
    mu   = ctrl.base_p ? rd(A_MU_BP)  : rd(A_MU_B);
    mni  = ctrl.base_p ? rd(A_MNI_BP) : rd(A_MNI_B);
  end

  wb_tag_t      in_tag, out_tag;
  logic         out_valid;
  logic [R-1:0] z;

  assign in_tag = '{wr: ctrl.wr, addr: ctrl.wr_addr};

  mont_rower_alu #(.R(R), .TAG_W($bits(wb_tag_t))) u_alu (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (ctrl.issue),
    .in_acc   (ctrl.acc),
    .in_tag   (in_tag),
    .a        (op_a),
    .b        (op_b),
    .mu       (mu),
    .m_neg_inv(mni),
    .out_valid(out_valid),
    .out_tag  (out_tag),
    .z        (z)
  );

  logic wb;
  assign wb = out_valid && out_tag.wr;

  always_ff @(posedge clk) begin
    if (wb && int'(out_tag.addr) < DEPTH)     mem[out_tag.addr[DW-1:0]] <= z;
    else if (hw_en && int'(hw_addr) < DEPTH)  mem[hw_addr[DW-1:0]]      <= hw_data;
  end

  assign bc_data = rd(bc_addr);
  assign hr_data = rd(hr_addr);

  // The host must not write while a result is being written back.
  a_no_host_collision: assert property (@(posedge clk) disable iff (!rst_n) !(wb && hw_en));

endmodule
