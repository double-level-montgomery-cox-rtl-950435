// tb_mont_rower_alu: self-checking test of the inner Montgomery Rower ALU.
//
// Issues random chains of operations (first without, then with
// accumulation) on random moduli 2^r - mu over the whole mu range, plus
// chains on the even modulus 2^r (mu = 0), with random idle cycles between.
// A reference model computes a*b*2^-r mod m with 64-bit integers and
// modular inverses found by the extended Euclidean algorithm. Every result
// is checked, together with its tag and its arrival exactly 5 cycles after
// issue; back-to-back accumulation is exercised.
module tb_mont_rower_alu;
  localparam int unsigned R   = 17;
  localparam int unsigned LAT = 5;
  localparam int unsigned TW  = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid, in_acc, out_valid;
  logic [TW-1:0] in_tag, out_tag;
  logic [R-1:0]  a, b, mu, mni, z;

  mont_rower_alu #(.R(R), .TAG_W(TW)) dut (.*, .m_neg_inv(mni));

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

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

  typedef struct { longint exp_z; longint due; logic [TW-1:0] tag; } exp_t;
  exp_t q[$];

  // Check results as they come out
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        exp_t e;
        e = q.pop_front();
        if (longint'(z) != e.exp_z || out_tag != e.tag || cycle != e.due) begin
          failures++;
          $display("FAIL tag %0d: z=%0d exp=%0d tag=%0d cycle=%0d due=%0d",
                   e.tag, z, e.exp_z, out_tag, cycle, e.due);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint model_z;
  int nchains_even = 0, nchains_odd = 0, nfull_sub = 0;
  initial begin
    in_valid = 0; in_acc = 0; in_tag = 0; a = 0; b = 0; mu = 1; mni = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    for (int ch = 0; ch < 3000; ch++) begin
      longint m, rinv, mul;
      int len;
      logic even;
      even = (ch % 10 == 9);
      if (even) begin
        mu = 0; m = longint'(1) << R; mni = 0;
        nchains_even++;
      end else begin
        // spread mu over small (the range used in practice) and large values
        if (ch % 2 == 0) mu = R'($urandom_range(2114, 1)) | 1;
        else             mu = R'($urandom_range((1 << R) - 3, 1)) | 1;
        m   = (longint'(1) << R) - longint'(mu);
        mni = R'((longint'(1) << R) - inv_mod(m, longint'(1) << R));
        nchains_odd++;
      end
      rinv = even ? 1 : inv_mod((longint'(1) << R) % m, m);
      len = $urandom_range(6, 1);
      for (int k = 0; k < len; k++) begin
        longint prod;
        a = R'($urandom);
        b = even ? R'($urandom) : R'(longint'($urandom) % m);
        if (ch % 7 == 0) begin a = '1; b = even ? '1 : R'(m - 1); end   // largest operands
        mul  = ((longint'(a) * longint'(b)) % m) * rinv % m;
        prod = even ? (longint'(a) * longint'(b)) % m : mul;
        in_acc   = (k != 0);
        model_z  = in_acc ? (model_z + prod) % m : prod;
        in_valid = 1;
        in_tag   = TW'(ch * 8 + k);
        q.push_back('{exp_z: model_z, due: cycle + longint'(LAT), tag: in_tag});
        @(posedge clk);
        #1;
      end
      in_valid = 0;
      // idle gap, sometimes none
      repeat ($urandom_range(2, 0)) begin @(posedge clk); #1; end
    end
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (q.size() != 0 || nchains_even == 0 || nchains_odd == 0) begin
      failures++; $display("FAIL: %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
