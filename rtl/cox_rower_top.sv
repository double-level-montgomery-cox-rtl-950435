// cox_rower_top: RNS Cox-Rower array with the double-level Montgomery
// Rower ALU, computing modular multiplications over F_p for any p.
//
// A large integer X is held as its residues modulo two bases B = {m_j} and
// B' = {m'_j} of n moduli each, every modulus of the form 2^r - mu with mu
// within the mu bound (cr_pkg). Rower j keeps residue j of both bases in
// the inner Montgomery domain (x~ = x 2^r mod m). One command multiplies two
// registers and reduces the product by the outer RNS Montgomery reduction:
// two base extensions, during which each Rower in turn broadcasts one value
// to all Rowers and to the Cox, which sums the values' top q bits to find
// the multiple of M (M') to remove.
//
// Blocks: N rower instances (ALU + local memory), one cox, one
// mmr_sequencer, and the broadcast multiplexer that selects the Rower
// named by the sequencer. The host loads the per-Rower constants and
// operands through the write port and reads results through the read
// port, which returns the addressed word of every Rower at once. Address
// map and constant formulas: cr_pkg.
//
// Taken from the published architecture: Rower ALU, Cox truncation, the
// reduction schedule and the default sizes (r = 17, n = 31, q = 7,
// alpha = 0.5: the 521-bit curve).
// This design's own: the host port, the command interface, the local
// memory map and the number of general-purpose registers.
//
// Timing: hw_en/hr_addr act in the same cycle (write at the clock edge,
// read without one). A command (start with ra, rb, rd while busy is low)
// ends with done, 2n + 28 cycles after start; the host must not write
// while busy.
module cox_rower_top
  import cr_pkg::*;
#(
  parameter int unsigned R     = cr_pkg::R_DEF,
  parameter int unsigned N     = cr_pkg::N_DEF,
  parameter int unsigned Q     = cr_pkg::Q_DEF,
  parameter int unsigned ALPHA = cr_pkg::ALPHA_DEF,
  parameter int unsigned NREG  = cr_pkg::NREG_DEF,
  parameter int unsigned IW    = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned RW    = (NREG > 1) ? $clog2(NREG) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // host memory port
  input  logic             hw_en,
  input  logic [IW-1:0]    hw_rower,
  input  logic [AW-1:0]    hw_addr,
  input  logic [R-1:0]     hw_data,
  input  logic [AW-1:0]    hr_addr,
  output logic [R-1:0]     hr_data [N],
  // command port
  input  logic             start,
  input  logic [RW-1:0]    ra,
  input  logic [RW-1:0]    rb,
  input  logic [RW-1:0]    rd,
  output logic             busy,
  output logic             done
);

  localparam int unsigned KW = $clog2(N + 1) + 1;

  rower_ctrl_t   ctrl;
  logic [IW-1:0] bc_idx;
  logic [AW-1:0] bc_addr;
  logic          cox_init, cox_add;
  logic [Q-1:0]  cox_alpha;
  logic [KW-1:0] k;
  logic [R-1:0]  bcast;
  logic [R-1:0]  bc_data [N];

  mmr_sequencer #(.N(N), .Q(Q), .ALPHA(ALPHA), .NREG(NREG)) u_seq (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .ra       (ra),
    .rb       (rb),
    .rd       (rd),
    .busy     (busy),
    .done     (done),
    .ctrl     (ctrl),
    .bc_idx   (bc_idx),
    .bc_addr  (bc_addr),
    .cox_init (cox_init),
    .cox_alpha(cox_alpha),
    .cox_add  (cox_add)
  );

  cox #(.R(R), .Q(Q), .N(N), .KW(KW)) u_cox (
    .clk       (clk),
    .rst_n     (rst_n),
    .init      (cox_init),
    .init_alpha(cox_alpha),
    .add       (cox_add),
    .xi        (bcast),
    .k         (k)
  );

  // Broadcast bus
  always_comb bcast = bc_data[bc_idx];

  for (genvar j = 0; j < N; j++) begin : g_rower
    rower #(.R(R), .N(N), .NREG(NREG)) u_rower (
      .clk    (clk),
      .rst_n  (rst_n),
      .ctrl   (ctrl),
      .bcast  (bcast),
      .cox_k  (R'(k)),
      .bc_addr(bc_addr),
      .bc_data(bc_data[j]),
      .hw_en  (hw_en && hw_rower == IW'(j)),
      .hw_addr(hw_addr),
      .hw_data(hw_data),
      .hr_addr(hr_addr),
      .hr_data(hr_data[j])
    );
  end

  a_no_write_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(busy && hw_en));
  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(busy && start));

endmodule
