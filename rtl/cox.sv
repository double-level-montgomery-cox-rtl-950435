// cox: the Cox unit, which estimates the number k of multiples of M to
// remove in a base extension.
//
// A base extension needs k = floor(sum_i xi_i / m_i). The Cox replaces each
// m_i by 2^r and each xi_i by its q most significant bits, so it only adds
// q-bit fractions:  k^ = floor(alpha + sum_i trunc_q(xi_i) / 2^r).
// The register holds that sum in fixed point with q fraction bits and
// KW integer bits; init loads alpha (0 for the first extension, errinit
// for the second), each add cycle adds the top q bits of xi, and k is the
// integer part of the register. With r, q, n and mu_max chosen per
// the mu bound and the q bound (see cr_pkg), k^ equals k for inputs x < (1 - alpha) M.
//
// The truncation, the q-bit adder and the two initialisations follow the
// published base-extension method; the init/add interface and
// the width KW = clog2(n+1)+1 of the integer part are this design's own.
//
// Timing: init or add in cycle t changes k in cycle t+1. init wins over
// add if both are set.
module cox #(
  parameter int unsigned R  = cr_pkg::R_DEF,
  parameter int unsigned Q  = cr_pkg::Q_DEF,
  parameter int unsigned N  = cr_pkg::N_DEF,
  parameter int unsigned KW = $clog2(N + 1) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,        // load alpha
  input  logic [Q-1:0]  init_alpha,  // alpha * 2^q
  input  logic          add,         // accumulate trunc_q(xi)
  input  logic [R-1:0]  xi,
  output logic [KW-1:0] k            // floor(alpha + sum trunc_q(xi)/2^r)
);

  logic [KW+Q-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc <= '0;
    else if (init) acc <= (KW+Q)'(init_alpha);
    else if (add)  acc <= acc + (KW+Q)'(xi[R-1 -: Q]);
  end

  assign k = acc[KW+Q-1:Q];

endmodule
