// mont_rower_alu: the Rower ALU built on an inner level of Montgomery
// reduction (radix 2^r).
//
// For a modulus m = 2^r - mu with m odd it computes
//     z = (acc ? z : 0) + a*b*2^-r  mod m        (a < 2^r, b < m)
// in five register stages, one operation per cycle:
//   stage 1  input registers a, b, mu, -m^-1
//   stage 2  c  = a*b                          (r x r -> 2r multiplier)
//   stage 3  q0 = c0 * (-m^-1) mod 2^r         (r x r -> r, low half only)
//   stage 4  q0*m                              (r x r -> 2r), c carried along
//   stage 5  s = q0*m + c; s1 = s >> r < 2m; z = acc + s1 reduced mod m
// The stage-5 register z is both the result and the single accumulator:
// an operation issued with acc = 1 adds its product to the previous
// result, so consecutive operations of one chain may be issued back to
// back. Because acc + s1 < 3m, the adder/reducer subtracts m or 2m, using
// m = 2^r - mu.
//
// The stage order, the three multipliers, the separate adder and the
// accumulating adder/reducer follow the published Montgomery Rower ALU. A modulus with mu = 0 (m = 2^r, the one even modulus a
// base may hold) bypasses the reduction: z = acc + c mod 2^r, a plain
// product. The issue/valid handshake and the pass-through tag are this
// design's own.
//
// Timing: an operation presented with in_valid in cycle t gives out_valid
// and its z in cycle t+5. No stalls.
module mont_rower_alu #(
  parameter int unsigned R     = cr_pkg::R_DEF,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_acc,      // accumulate onto the current z
  input  logic [TAG_W-1:0] in_tag,      // carried unchanged to out_tag
  input  logic [R-1:0]     a,
  input  logic [R-1:0]     b,
  input  logic [R-1:0]     mu,          // m = 2^r - mu
  input  logic [R-1:0]     m_neg_inv,   // -m^-1 mod 2^r
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output logic [R-1:0]     z
);

  // Pipeline control, one entry per stage 1..4.
  typedef struct packed {
    logic             v;
    logic             acc;
    logic [TAG_W-1:0] tag;
    logic [R-1:0]     mu;
  } ctl_t;

  ctl_t ctl1, ctl2, ctl3, ctl4;

  logic [R-1:0]   a1, b1, mni1, mni2;
  logic [2*R-1:0] c2, c3, c4;
  logic [R-1:0]   q3;
  logic [2*R-1:0] p4;

  // Stage 1: operand registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl1 <= '0;
      a1   <= '0;
      b1   <= '0;
      mni1 <= '0;
    end else begin
      ctl1 <= '{v: in_valid, acc: in_acc, tag: in_tag, mu: mu};
      a1   <= a;
      b1   <= b;
      mni1 <= m_neg_inv;
    end
  end

  // Stage 2: c = a*b
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl2 <= '0;
      c2   <= '0;
      mni2 <= '0;
    end else begin
      ctl2 <= ctl1;
      c2   <= a1 * b1;
      mni2 <= mni1;
    end
  end

  // Stage 3: q0 = c0 * (-m^-1) mod 2^r
  logic [2*R-1:0] q_full;
  always_comb q_full = c2[R-1:0] * mni2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl3 <= '0;
      q3   <= '0;
      c3   <= '0;
    end else begin
      ctl3 <= ctl2;
      q3   <= q_full[R-1:0];
      c3   <= c2;
    end
  end

  // Stage 4: q0*m
  logic [R:0]     m3;
  logic [2*R:0]   p_full;
  always_comb begin
    m3     = ((R+1)'(1) << R) - (R+1)'(ctl3.mu);
    p_full = (2*R+1)'(q3) * (2*R+1)'(m3);
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl4 <= '0;
      p4   <= '0;
      c4   <= '0;
    end else begin
      ctl4 <= ctl3;
      p4   <= p_full[2*R-1:0];
      c4   <= c3;
    end
  end

  // Stage 5: s = q0*m + c, then accumulate and reduce.
  logic [2*R:0] s;
  logic [R:0]   s1;          // < 2m
  logic [R+1:0] t, t_m, t_2m;
  logic [R+1:0] m_ext;
  logic [R-1:0] z_base, z_next;

  always_comb begin
    s      = (2*R+1)'(c4) + (2*R+1)'(p4);
    s1     = s[2*R:R];
    m_ext  = ((R+2)'(1) << R) - (R+2)'(ctl4.mu);
    z_base = ctl4.acc ? z : '0;
    t      = (R+2)'(z_base) + (R+2)'(s1);
    t_m    = t - m_ext;
    t_2m   = t - (m_ext << 1);
    if (ctl4.mu == '0)           z_next = z_base + c4[R-1:0];  // m = 2^r
    else if (t >= (m_ext << 1))  z_next = t_2m[R-1:0];
    else if (t >= m_ext)         z_next = t_m[R-1:0];
    else                         z_next = t[R-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z         <= '0;
      out_valid <= 1'b0;
      out_tag   <= '0;
    end else begin
      out_valid <= ctl4.v;
      out_tag   <= ctl4.tag;
      if (ctl4.v) z <= z_next;
    end
  end

endmodule
