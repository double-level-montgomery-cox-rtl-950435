// cr_curve_run: one curve-size run of the Cox-Rower array, used by
// tb_cox_rower_curves.
//
// Instantiates the array with n Rowers for a p of CURVE bits, picks 2n
// coprime moduli with mu below 2^MU_LOG2 (and below the mu bound),
// uses the Cox width q required by the q bound for that mu_max and alpha = 1/2
// (at least Q_TABLE), loads all constants and runs chains of modular
// multiplications, checking each result against wide-integer arithmetic:
// S*M = A*B mod p, S < 3p, S equal to the exact reduction or one p more, all
// residues of both bases consistent, and a latency of 2n + 28 cycles.
// Raises finished when done; checks and failures count the comparisons.
module cr_curve_run
  import cr_pkg::*;
#(
  parameter int unsigned CURVE   = 160,  // bits of p
  parameter int unsigned N       = 10,   // moduli per base
  parameter int unsigned Q_TABLE = 5,    // Cox width listed for this curve
  parameter int unsigned MU_LOG2 = 7     // log2(mu_max) listed for this curve
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned R     = R_DEF;
  // q from the q bound for the listed mu_max and alpha = 1/2, never below the listed one
  localparam int unsigned Q_EQ  = q_min(R, N, (1 << MU_LOG2) - 1, 1, 2);
  localparam int unsigned Q     = (Q_EQ > Q_TABLE) ? Q_EQ : Q_TABLE;
  localparam int unsigned ALPHA = 1 << (Q - 1);
  localparam int unsigned NREG  = NREG_DEF;
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned RW    = (NREG > 1) ? $clog2(NREG) : 1;
  localparam int unsigned PB    = CURVE;
  localparam int unsigned BW    = 2 * R * N + 96;
  localparam int unsigned NOPS  = 30;
  typedef logic [BW-1:0] big_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          hw_en, start, busy, done;
  logic [IW-1:0] hw_rower;
  logic [AW-1:0] hw_addr, hr_addr;
  logic [R-1:0]  hw_data;
  logic [R-1:0]  hr_data [N];
  logic [RW-1:0] ra, rb, rd;

  cox_rower_top #(.R(R), .N(N), .Q(Q), .ALPHA(ALPHA), .NREG(NREG)) dut (.*);


  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: %0d-bit run did not finish", CURVE);
    finished = 1;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- small modular arithmetic ----------------
  function automatic longint inv_mod(longint x, longint m);
    longint t = 0, nt = 1, r = m, nr = x % m, qq, tmp;
    while (nr != 0) begin
      qq = r / nr;
      tmp = t - qq * nt; t = nt; nt = tmp;
      tmp = r - qq * nr; r = nr; nr = tmp;
    end
    if (t < 0) t += m;
    return t;
  endfunction

  function automatic longint gcd(longint a, longint b);
    while (b != 0) begin longint t = a % b; a = b; b = t; end
    return a;
  endfunction

  function automatic longint mm(longint a, longint b, longint m);
    return ((a % m) * (b % m)) % m;
  endfunction

  function automatic longint bmod(big_t x, longint m);
    big_t r;
    r = x % big_t'(m);
    return longint'(r[63:0]);
  endfunction

  // ---------------- bases and constants ----------------
  longint mb [N], mp [N];      // moduli of B and B'
  big_t   Mbig, MPbig, p;
  int     mu_max;

  task automatic pick_moduli();
    longint chosen [2*N];
    int cnt = 0;
    int lim = mu_max_bound(R, Q, N, ALPHA);
    if (lim > (1 << MU_LOG2) - 1) lim = (1 << MU_LOG2) - 1;
    mu_max = 0;
    while (cnt < 2 * N) begin
      longint mu, m;
      bit ok = 1;
      mu = longint'($urandom_range(lim, 1) | 1);
      if (mu > lim) continue;
      m = (longint'(1) << R) - mu;
      for (int i = 0; i < cnt; i++) if (gcd(m, chosen[i]) != 1) ok = 0;
      if (ok) begin
        chosen[cnt++] = m;
        if (int'(mu) > mu_max) mu_max = int'(mu);
      end
    end
    for (int j = 0; j < N; j++) begin mb[j] = chosen[j]; mp[j] = chosen[N + j]; end
    check(mu_bound_ok(R, Q, N, ALPHA, mu_max), "mu bound");
    check(q_min(R, N, mu_max, ALPHA, 1 << Q) <= Q, "q bound: q too small");
    Mbig = 1; MPbig = 1;
    for (int j = 0; j < N; j++) begin Mbig = Mbig * big_t'(mb[j]); MPbig = MPbig * big_t'(mp[j]); end
  endtask

  task automatic pick_p();
    bit ok;
    do begin
      p = '0;
      for (int w = 0; w < (PB + 31) / 32; w++) p[w*32 +: 32] = $urandom;
      p = p & ((big_t'(1) << PB) - 1);
      p[PB-1] = 1'b1;
      p[0] = 1'b1;
      ok = 1;
      for (int j = 0; j < N; j++)
        if (gcd(bmod(p, mb[j]), mb[j]) != 1 || gcd(bmod(p, mp[j]), mp[j]) != 1) ok = 0;
    end while (!ok);
  endtask

  task automatic host_write(int j, logic [AW-1:0] addr, longint val);
    hw_en = 1; hw_rower = IW'(j); hw_addr = addr; hw_data = R'(val);
    @(posedge clk); #1;
    hw_en = 0;
  endtask

  task automatic load_constants();
    longint two_r = longint'(1) << R;
    for (int j = 0; j < N; j++) begin
      longint m = mb[j], mq = mp[j];
      longint M_modq = 1, MP_modm = 1, Mj_modm = 1, MPj_modq = 1;
      longint r1q, r2m, r2q, pq, pm, Minv_q, MPj_inv;
      for (int k = 0; k < N; k++) begin
        M_modq  = mm(M_modq, mb[k], mq);
        MP_modm = mm(MP_modm, mp[k], m);
        if (k != j) begin Mj_modm = mm(Mj_modm, mb[k], m); MPj_modq = mm(MPj_modq, mp[k], mq); end
      end
      r1q = two_r % mq;
      r2m = mm(two_r, two_r, m);
      r2q = mm(two_r, two_r, mq);
      pm = bmod(p, m);
      pq = bmod(p, mq);
      Minv_q  = inv_mod(M_modq, mq);
      MPj_inv = inv_mod(MPj_modq, mq);
      host_write(j, A_MU_B,   two_r - m);
      host_write(j, A_MNI_B,  two_r - inv_mod(m, two_r));
      host_write(j, A_MU_BP,  two_r - mq);
      host_write(j, A_MNI_BP, two_r - inv_mod(mq, two_r));
      // (-p^-1) M_j^-1 mod m_j
      host_write(j, A_QINV, mm(m - inv_mod(pm, m), inv_mod(Mj_modm, m), m));
      // M^-1 M'_j^-1 mod m'_j
      host_write(j, A_XC, mm(Minv_q, MPj_inv, mq));
      // (-M) p M^-1 M'_j^-1 2^r mod m'_j
      host_write(j, A_K1, mm(mm(mm((mq - M_modq) % mq, pq, mq), mm(Minv_q, MPj_inv, mq), mq), r1q, mq));
      // (-M') 2^2r mod m_j
      host_write(j, A_K2, mm((m - MP_modm) % m, r2m, m));
      // M'_j 2^2r mod m'_j
      host_write(j, A_SC, mm(MPj_modq, r2q, mq));
      for (int i = 0; i < N; i++) begin
        longint Mi_modq = 1, MPi_modm = 1;
        for (int k = 0; k < N; k++) if (k != i) begin
          Mi_modq  = mm(Mi_modq, mb[k], mq);
          MPi_modm = mm(MPi_modm, mp[k], m);
        end
        // M_i p M^-1 M'_j^-1 2^r mod m'_j
        host_write(j, a_be1(i), mm(mm(mm(Mi_modq, pq, mq), mm(Minv_q, MPj_inv, mq), mq), r1q, mq));
        // M'_i 2^2r mod m_j
        host_write(j, a_be2(N, i), mm(MPi_modm, r2m, m));
      end
    end
  endtask

  // ---------------- operands and results ----------------
  big_t regval [NREG];   // integer held by each register

  task automatic load_reg(int k, big_t v);
    longint two_r = longint'(1) << R;
    for (int j = 0; j < N; j++) begin
      host_write(j, a_gpr(N, k, 1'b0), mm(bmod(v, mb[j]), two_r, mb[j]));
      host_write(j, a_gpr(N, k, 1'b1), mm(bmod(v, mp[j]), two_r, mp[j]));
    end
    regval[k] = v;
  endtask

  function automatic big_t rand_below_p();
    big_t v = '0;
    for (int w = 0; w < (PB + 31) / 32; w++) v[w*32 +: 32] = $urandom;
    return v % p;
  endfunction

  int n_exact = 0, n_plus_p = 0, n_k1 = 0, n_k2 = 0, n_sq = 0, n_chain = 0;

  task automatic run_mul(int a, int b, int d);
    big_t X, sumq, Qx, S0, S, sumx;
    longint two_r = longint'(1) << R;
    longint xi [N];
    longint xip [N];
    longint res_b [N], res_p [N];
    int cyc = 0;
    bit is_plus, ok;
    // reference
    X = regval[a] * regval[b];
    sumq = 0;
    for (int i = 0; i < N; i++) begin
      longint Mi = 1;
      for (int k = 0; k < N; k++) if (k != i) Mi = mm(Mi, mb[k], mb[i]);
      xi[i] = mm(mm(bmod(X, mb[i]), mb[i] - inv_mod(bmod(p, mb[i]), mb[i]), mb[i]),
                 inv_mod(Mi, mb[i]), mb[i]);
      sumq = sumq + big_t'(xi[i]) * (Mbig / big_t'(mb[i]));
    end
    Qx = sumq % Mbig;
    if (sumq / Mbig != 0) n_k1++;
    check((X + Qx * p) % Mbig == 0, "reference: X + Qp not divisible by M");
    S0 = (X + Qx * p) / Mbig;
    // hardware
    start = 1; ra = RW'(a); rb = RW'(b); rd = RW'(d);
    @(posedge clk); #1;
    start = 0;
    while (!done && cyc < 1000) begin @(posedge clk); #1; cyc++; end
    check(cyc + 1 == 2 * N + 28, $sformatf("latency %0d cycles, expected %0d", cyc + 1, 2 * N + 28));
    hr_addr = a_gpr(N, d, 1'b0);
    #1;
    for (int j = 0; j < N; j++) res_b[j] = mm(longint'(hr_data[j]), inv_mod(two_r % mb[j], mb[j]), mb[j]);
    hr_addr = a_gpr(N, d, 1'b1);
    #1;
    for (int j = 0; j < N; j++) res_p[j] = mm(longint'(hr_data[j]), inv_mod(two_r % mp[j], mp[j]), mp[j]);
    is_plus = (res_b[0] != bmod(S0, mb[0]));
    S = is_plus ? S0 + p : S0;
    if (is_plus) n_plus_p++; else n_exact++;
    ok = 1;
    for (int j = 0; j < N; j++)
      if (res_b[j] != bmod(S, mb[j]) || res_p[j] != bmod(S, mp[j])) ok = 0;
    check(ok, $sformatf("residues of result r%0d = r%0d * r%0d", d, a, b));
    check((S * Mbig) % p == X % p, "S*M != A*B mod p");
    check(S < 3 * p, "result not below 3p");
    // multiple removed by the second extension
    sumx = 0;
    for (int i = 0; i < N; i++) begin
      longint Mpi = 1;
      for (int k = 0; k < N; k++) if (k != i) Mpi = mm(Mpi, mp[k], mp[i]);
      xip[i] = mm(bmod(S, mp[i]), inv_mod(Mpi, mp[i]), mp[i]);
      sumx = sumx + big_t'(xip[i]) * (MPbig / big_t'(mp[i]));
    end
    if (sumx / MPbig != 0) n_k2++;
    if (a == b) n_sq++;
    if (a == d || b == d) n_chain++;
    regval[d] = S;
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0;
    hw_en = 0; hw_rower = 0; hw_addr = 0; hw_data = 0; hr_addr = 0;
    start = 0; ra = 0; rb = 0; rd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    pick_moduli();
    pick_p();
    load_constants();
    load_reg(0, rand_below_p());
    load_reg(1, 0);
    run_mul(0, 1, 2);                 // times zero
    check(regval[2] % p == 0, "0 * a != 0");
    for (int k = 0; k < NREG; k++) load_reg(k, rand_below_p());
    for (int t = 0; t < NOPS; t++) begin
      int a, b, d;
      a = $urandom_range(NREG - 1, 0);
      b = (t % 5 == 0) ? a : $urandom_range(NREG - 1, 0);
      d = (t % 3 == 0) ? a : $urandom_range(NREG - 1, 0);
      if (regval[a] >= 3 * p || regval[b] >= 3 * p) continue;
      run_mul(a, b, d);
      if (t % 20 == 19) for (int k = 0; k < NREG; k++) load_reg(k, rand_below_p());  // fresh operands
    end
    $display("%0d-bit p, n = %0d, q = %0d (listed %0d), mu_max = %0d", CURVE, N, Q, Q_TABLE, mu_max);
    $display("exact first extension %0d, one short %0d, k1>0 %0d, k2>0 %0d, squarings %0d, in-place %0d",
             n_exact, n_plus_p, n_k1, n_k2, n_sq, n_chain);
    check(n_exact > 0, "first extension never exact");
    
    check(n_k1 > 0, "first extension never removed a multiple of M");
    check(n_k2 > 0, "second extension never removed a multiple of M'");
    check(n_sq > 0 && n_chain > 0, "no squaring or in-place result");
    finished = 1;
  end
endmodule
