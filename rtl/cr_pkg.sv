// cr_pkg: shared constants, types and helper functions of the RNS Cox-Rower.
//
// Defaults are those of the 521-bit configuration: radix r = 17 (one
// 25x18 signed DSP multiplier used as an unsigned 17x17 one), n = 31 Rowers,
// Cox adder width q = 7 and base-extension offset alpha = 0.5.
//
// Every Rower owns a small local memory. The address map below is this
// design's own: fixed words for the precomputed constants of the outer RNS
// Montgomery reduction (see mmr_sequencer), the two
// modulus descriptions (mu, -m^-1 mod 2^r) of base B and base B', four
// scratch words, the per-i base-extension constants, and NREG
// general-purpose registers that each hold one residue in B and one in B'.
//
// The bound functions encode the base-extension conditions: the mu bound,
// mu_max <= 2^r*alpha/n - 2^(r-q) + 1, and the q bound,
// 2^-q <= alpha/n + 2^-r - mu_max/2^r, both
// in exact integer form with alpha = alpha_q / 2^q.
package cr_pkg;

  localparam int unsigned R_DEF     = 17;  // radix r
  localparam int unsigned N_DEF     = 31;  // moduli per base = number of Rowers
  localparam int unsigned Q_DEF     = 7;   // Cox adder width q
  localparam int unsigned ALPHA_DEF = 64;  // errinit, alpha = 64/2^7 = 0.5
  localparam int unsigned NREG_DEF  = 16;  // general-purpose registers per base
  localparam int unsigned ALU_LAT   = 5;   // ALU registers between issue and result
  localparam int unsigned AW        = 8;   // local memory address width

  // Fixed words of the local memory.
  localparam logic [AW-1:0] A_QINV   = 8'd0;   // (-p^-1) M_j^-1 mod m_j
  localparam logic [AW-1:0] A_XC     = 8'd1;   // M^-1 M'_j^-1 mod m'_j
  localparam logic [AW-1:0] A_K1     = 8'd2;   // (-M) p M^-1 M'_j^-1 2^r mod m'_j
  localparam logic [AW-1:0] A_K2     = 8'd3;   // (-M') 2^2r mod m_j
  localparam logic [AW-1:0] A_SC     = 8'd4;   // M'_j 2^2r mod m'_j
  localparam logic [AW-1:0] A_MU_B   = 8'd5;   // mu_j      (m_j  = 2^r - mu_j)
  localparam logic [AW-1:0] A_MNI_B  = 8'd6;   // -m_j^-1 mod 2^r
  localparam logic [AW-1:0] A_MU_BP  = 8'd7;   // mu'_j     (m'_j = 2^r - mu'_j)
  localparam logic [AW-1:0] A_MNI_BP = 8'd8;   // -m'_j^-1 mod 2^r
  localparam logic [AW-1:0] A_TX     = 8'd9;   // scratch: product in B
  localparam logic [AW-1:0] A_TXP    = 8'd10;  // scratch: product in B'
  localparam logic [AW-1:0] A_TQ     = 8'd11;  // scratch: xi_j of the first extension
  localparam logic [AW-1:0] A_TXI    = 8'd12;  // scratch: xi'_j of the second extension
  localparam int unsigned   A_TABLE  = 16;     // first per-i constant

  // M_i p M^-1 M'_j^-1 2^r mod m'_j, i = 0..n-1
  function automatic logic [AW-1:0] a_be1(int unsigned i);
    return AW'(A_TABLE + i);
  endfunction

  // M'_i 2^2r mod m_j, i = 0..n-1
  function automatic logic [AW-1:0] a_be2(int unsigned n, int unsigned i);
    return AW'(A_TABLE + n + i);
  endfunction

  // General-purpose register k; base_p = 0 selects its B residue, 1 its B' one.
  function automatic logic [AW-1:0] a_gpr(int unsigned n, int unsigned k, logic base_p);
    return AW'(A_TABLE + 2 * n + 2 * k + int'(base_p));
  endfunction

  function automatic int unsigned mem_depth(int unsigned n, int unsigned nreg);
    return A_TABLE + 2 * n + 2 * nreg;
  endfunction

  // mu bound with alpha = alpha_q/2^q: n*(mu_max + 2^(r-q) - 1) <= alpha_q*2^(r-q).
  function automatic bit mu_bound_ok(int unsigned r, int unsigned q, int unsigned n,
                                     int unsigned alpha_q, int unsigned mu_max);
    longint unsigned lhs, rhs;
    lhs = longint'(n) * (longint'(mu_max) + (64'd1 << (r - q)) - 1);
    rhs = longint'(alpha_q) << (r - q);
    return lhs <= rhs;
  endfunction

  // Largest mu allowed by the mu bound for the given r, q, n and alpha.
  function automatic int unsigned mu_max_bound(int unsigned r, int unsigned q, int unsigned n,
                                               int unsigned alpha_q);
    longint unsigned rhs;
    rhs = (longint'(alpha_q) << (r - q)) / longint'(n);
    if (rhs + 1 < (64'd1 << (r - q))) return 0;
    return int'(rhs - (64'd1 << (r - q)) + 1);
  endfunction

  // Smallest q satisfying the q bound for alpha = alpha_num/alpha_den; 0 if none <= r.
  function automatic int unsigned q_min(int unsigned r, int unsigned n, int unsigned mu_max,
                                        int unsigned alpha_num, int unsigned alpha_den);
    // q bound: 2^-q <= alpha/n + 2^-r - mu_max/2^r, multiplied by n*den*2^r
    for (int unsigned q = 1; q <= r; q++) begin
      longint unsigned lhs, rhs;
      lhs = longint'(n) * alpha_den * (64'd1 << (r - q));
      rhs = longint'(alpha_num) * (64'd1 << r) + longint'(n) * alpha_den
            - longint'(n) * alpha_den * mu_max;
      if (longint'(alpha_num) * (64'd1 << r) + longint'(n) * alpha_den
          >= longint'(n) * alpha_den * mu_max && lhs <= rhs)
        return q;
    end
    return 0;
  endfunction

  // Source of ALU operand A.
  typedef enum logic [1:0] {
    ASRC_MEM   = 2'd0,  // local memory word a_addr
    ASRC_BCAST = 2'd1,  // value broadcast from one Rower
    ASRC_COX   = 2'd2   // integer k from the Cox
  } asrc_e;

  // Control word sent by the sequencer to every Rower in the same cycle.
  typedef struct packed {
    logic          issue;    // start one ALU operation
    logic          acc;      // add to the accumulator instead of starting from 0
    logic          base_p;   // 0: modulus of base B, 1: modulus of base B'
    asrc_e         asrc;     // where operand A comes from
    logic [AW-1:0] a_addr;   // operand A address when asrc = ASRC_MEM
    logic [AW-1:0] b_addr;   // operand B address
    logic          wr;       // write the result back
    logic [AW-1:0] wr_addr;  // write-back address
  } rower_ctrl_t;

  // Tag that travels down the ALU pipeline with an operation.
  typedef struct packed {
    logic          wr;
    logic [AW-1:0] addr;
  } wb_tag_t;

endpackage
