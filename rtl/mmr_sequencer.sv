// mmr_sequencer: runs one RNS Montgomery modular multiplication on the
// Cox-Rower array, following the outer Montgomery reduction with the inner
// Montgomery ALU.
//
// Operands and result live in general-purpose registers ra, rb, rd of every
// Rower, as residues in the inner Montgomery domain (x~ = x 2^r mod m) in
// both bases. The command computes S~ with S = A*B*M^-1 mod p (up to a
// multiple of p below 3p), in these phases; one control word goes to all
// Rowers per cycle, so the n Rowers work in lockstep:
//   MUL   x~ = a~ (x) b~ in B, then in B'                     (2 issues)
//   QI    xi_j = x~_j (x) [(-p^-1) M_j^-1]             in B   (1 issue)
//   BE1   for i: Rower i broadcasts xi_i, the Cox adds its top q bits,
//         every Rower j accumulates xi_i (x) [M_i p M^-1 M'_j^-1 2^r] in B',
//         then x~'_j (x) [M^-1 M'_j^-1], then k (x) [(-M) p M^-1 M'_j^-1 2^r]
//         giving xi'_j                                          (n+2 issues)
//   BE2   Cox starts from errinit; for i: Rower i broadcasts xi'_i, every
//         Rower accumulates xi'_i (x) [M'_i 2^2r] in B, then k (x) [(-M') 2^2r]
//         giving s~_j; finally s~'_j = xi'_j (x) [M'_j 2^2r] in B' (n+2 issues)
// where (x) is the ALU product a*b*2^-r. Each phase that reads the previous
// phase's results first waits ALU_LAT cycles for the pipeline to drain.
// The Cox starts from 0 for the first extension and from ALPHA for the
// second.
//
// The phase order and operations are those of the published algorithm;
// folding the operand product into the command, the register-file
// addressing, and issuing the x'-term before the k-term (so k is ready
// without an extra wait) are this design's choices.
//
// Timing: start is taken in S_IDLE; done pulses 2n + 4*ALU_LAT + 8 cycles
// later, one cycle after the last result is written. busy is high in
// between. The ALU sees 2n + 7 issue cycles per command.
module mmr_sequencer
  import cr_pkg::*;
#(
  parameter int unsigned N     = cr_pkg::N_DEF,
  parameter int unsigned Q     = cr_pkg::Q_DEF,
  parameter int unsigned ALPHA = cr_pkg::ALPHA_DEF,
  parameter int unsigned NREG  = cr_pkg::NREG_DEF,
  parameter int unsigned IW    = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned RW    = (NREG > 1) ? $clog2(NREG) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [RW-1:0] ra,
  input  logic [RW-1:0] rb,
  input  logic [RW-1:0] rd,
  output logic          busy,
  output logic          done,
  output rower_ctrl_t   ctrl,
  output logic [IW-1:0] bc_idx,     // Rower driving the broadcast bus
  output logic [AW-1:0] bc_addr,    // word it drives
  output logic          cox_init,
  output logic [Q-1:0]  cox_alpha,
  output logic          cox_add
);

  typedef enum logic [3:0] {
    S_IDLE, S_MUL_B, S_MUL_BP, S_QI, S_BE1, S_BE1_X, S_BE1_K,
    S_BE2, S_BE2_K, S_FIN, S_WAIT
  } state_e;

  state_e        state, after_wait;
  logic [IW-1:0] idx;
  logic [3:0]    wcnt;
  logic [RW-1:0] ra_q, rb_q, rd_q;

  // Next-state logic
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      after_wait <= S_IDLE;
      idx        <= '0;
      wcnt       <= '0;
      ra_q       <= '0;
      rb_q       <= '0;
      rd_q       <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:   if (start) begin
                    ra_q  <= ra;
                    rb_q  <= rb;
                    rd_q  <= rd;
                    state <= S_MUL_B;
                  end
        S_MUL_B:  state <= S_MUL_BP;
        S_MUL_BP: begin state <= S_WAIT; after_wait <= S_QI;  wcnt <= 4'(ALU_LAT - 1); end
        S_QI:     begin state <= S_WAIT; after_wait <= S_BE1; wcnt <= 4'(ALU_LAT - 1); idx <= '0; end
        S_BE1:    if (idx == IW'(N - 1)) state <= S_BE1_X; else idx <= idx + 1'b1;
        S_BE1_X:  state <= S_BE1_K;
        S_BE1_K:  begin state <= S_WAIT; after_wait <= S_BE2; wcnt <= 4'(ALU_LAT - 1); idx <= '0; end
        S_BE2:    if (idx == IW'(N - 1)) state <= S_BE2_K; else idx <= idx + 1'b1;
        S_BE2_K:  state <= S_FIN;
        S_FIN:    begin state <= S_WAIT; after_wait <= S_IDLE; wcnt <= 4'(ALU_LAT - 1); end
        S_WAIT:   if (wcnt == '0) begin
                    state <= after_wait;
                    done  <= (after_wait == S_IDLE);
                  end else wcnt <= wcnt - 1'b1;
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Control word of the current cycle
  always_comb begin
    ctrl      = '0;
    ctrl.asrc = ASRC_MEM;
    bc_idx    = idx;
    bc_addr   = A_TQ;
    cox_init  = 1'b0;
    cox_alpha = '0;
    cox_add   = 1'b0;
    unique case (state)
      S_MUL_B, S_MUL_BP: begin
        ctrl.issue   = 1'b1;
        ctrl.base_p  = (state == S_MUL_BP);
        ctrl.a_addr  = a_gpr(N, int'(ra_q), ctrl.base_p);
        ctrl.b_addr  = a_gpr(N, int'(rb_q), ctrl.base_p);
        ctrl.wr      = 1'b1;
        ctrl.wr_addr = ctrl.base_p ? A_TXP : A_TX;
      end
      S_QI: begin                              // QI
        ctrl.issue   = 1'b1;
        ctrl.a_addr  = A_TX;
        ctrl.b_addr  = A_QINV;
        ctrl.wr      = 1'b1;
        ctrl.wr_addr = A_TQ;
        cox_init     = 1'b1;                   // alpha = 0
      end
      S_BE1: begin                             // BE1, one term per i
        ctrl.issue   = 1'b1;
        ctrl.acc     = (idx != '0);
        ctrl.base_p  = 1'b1;
        ctrl.asrc    = ASRC_BCAST;
        ctrl.b_addr  = a_be1(int'(idx));
        bc_addr      = A_TQ;
        cox_add      = 1'b1;
      end
      S_BE1_X: begin                           // BE1, x'-term
        ctrl.issue   = 1'b1;
        ctrl.acc     = 1'b1;
        ctrl.base_p  = 1'b1;
        ctrl.a_addr  = A_TXP;
        ctrl.b_addr  = A_XC;
      end
      S_BE1_K: begin                           // BE1, k-term
        ctrl.issue   = 1'b1;
        ctrl.acc     = 1'b1;
        ctrl.base_p  = 1'b1;
        ctrl.asrc    = ASRC_COX;
        ctrl.b_addr  = A_K1;
        ctrl.wr      = 1'b1;
        ctrl.wr_addr = A_TXI;
        cox_init     = 1'b1;                   // alpha = errinit
        cox_alpha    = Q'(ALPHA);
      end
      S_BE2: begin                             // BE2, one term per i
        ctrl.issue   = 1'b1;
        ctrl.acc     = (idx != '0);
        ctrl.asrc    = ASRC_BCAST;
        ctrl.b_addr  = a_be2(N, int'(idx));
        bc_addr      = A_TXI;
        cox_add      = 1'b1;
      end
      S_BE2_K: begin                           // BE2, k-term gives s~_j
        ctrl.issue   = 1'b1;
        ctrl.acc     = 1'b1;
        ctrl.asrc    = ASRC_COX;
        ctrl.b_addr  = A_K2;
        ctrl.wr      = 1'b1;
        ctrl.wr_addr = a_gpr(N, int'(rd_q), 1'b0);
      end
      S_FIN: begin                             // s~'_j
        ctrl.issue   = 1'b1;
        ctrl.base_p  = 1'b1;
        ctrl.a_addr  = A_TXI;
        ctrl.b_addr  = A_SC;
        ctrl.wr      = 1'b1;
        ctrl.wr_addr = a_gpr(N, int'(rd_q), 1'b1);
      end
      default: ;
    endcase
  end

endmodule
