// tb_mmr_sequencer: self-checking test of the modular-multiplication sequencer.
//
// Starts commands with random register numbers and compares, cycle by
// cycle, every control output with a schedule written out here from the
// reduction steps: operand product in B and B', QI, the n BE1 terms with
// the x'-term and the k-term, the n BE2 terms with the k-term, and the
// final B' result, each phase after the ALU pipeline has
// drained. Also checks busy, that done comes exactly 2n + 28 cycles after
// start as one pulse, and that ra, rb, rd are taken only with start.
module tb_mmr_sequencer;
  import cr_pkg::*;
  localparam int unsigned N     = 5;
  localparam int unsigned Q     = 7;
  localparam int unsigned ALPHA = 64;
  localparam int unsigned NREG  = 8;
  localparam int unsigned IW    = $clog2(N);
  localparam int unsigned RW    = $clog2(NREG);
  localparam int unsigned L     = ALU_LAT;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, busy, done, cox_init, cox_add;
  logic [RW-1:0] ra, rb, rd;
  rower_ctrl_t   ctrl;
  logic [IW-1:0] bc_idx;
  logic [AW-1:0] bc_addr;
  logic [Q-1:0]  cox_alpha;

  mmr_sequencer #(.N(N), .Q(Q), .ALPHA(ALPHA), .NREG(NREG)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected control word t cycles after the start cycle.
  typedef struct {
    logic issue, acc, base_p, wr, init, add;
    asrc_e asrc;
    int a_addr, b_addr, wr_addr, bc_i, bc_a, alpha;
  } exp_t;

  function automatic exp_t expect_at(int t, int a, int b, int d);
    exp_t e;
    int gpr0 = A_TABLE + 2 * N;
    e = '{issue: 0, acc: 0, base_p: 0, wr: 0, init: 0, add: 0, asrc: ASRC_MEM,
          a_addr: -1, b_addr: -1, wr_addr: -1, bc_i: -1, bc_a: -1, alpha: 0};
    if (t == 0 || t == 1) begin              // x~ = a~ b~ in B then B'
      e.issue = 1; e.base_p = (t == 1); e.wr = 1;
      e.a_addr = gpr0 + 2 * a + t; e.b_addr = gpr0 + 2 * b + t;
      e.wr_addr = (t == 0) ? A_TX : A_TXP;
    end else if (t == L + 2) begin           // QI, Cox alpha = 0
      e.issue = 1; e.wr = 1; e.a_addr = A_TX; e.b_addr = A_QINV; e.wr_addr = A_TQ;
      e.init = 1; e.alpha = 0;
    end else if (t >= 2 * L + 3 && t < 2 * L + 3 + N) begin   // BE1 terms
      int i = t - (2 * L + 3);
      e.issue = 1; e.acc = (i != 0); e.base_p = 1; e.asrc = ASRC_BCAST;
      e.b_addr = A_TABLE + i; e.bc_i = i; e.bc_a = A_TQ; e.add = 1;
    end else if (t == 2 * L + 3 + N) begin   // BE1 x'-term
      e.issue = 1; e.acc = 1; e.base_p = 1; e.a_addr = A_TXP; e.b_addr = A_XC;
    end else if (t == 2 * L + 4 + N) begin   // BE1 k-term, then Cox alpha = errinit
      e.issue = 1; e.acc = 1; e.base_p = 1; e.asrc = ASRC_COX; e.b_addr = A_K1;
      e.wr = 1; e.wr_addr = A_TXI; e.init = 1; e.alpha = ALPHA;
    end else if (t >= 3 * L + 5 + N && t < 3 * L + 5 + 2 * N) begin  // BE2 terms
      int i = t - (3 * L + 5 + N);
      e.issue = 1; e.acc = (i != 0); e.asrc = ASRC_BCAST;
      e.b_addr = A_TABLE + N + i; e.bc_i = i; e.bc_a = A_TXI; e.add = 1;
    end else if (t == 3 * L + 5 + 2 * N) begin  // BE2 k-term
      e.issue = 1; e.acc = 1; e.asrc = ASRC_COX; e.b_addr = A_K2;
      e.wr = 1; e.wr_addr = gpr0 + 2 * d;
    end else if (t == 3 * L + 6 + 2 * N) begin  // final B' result
      e.issue = 1; e.base_p = 1; e.a_addr = A_TXI; e.b_addr = A_SC;
      e.wr = 1; e.wr_addr = gpr0 + 2 * d + 1;
    end
    return e;
  endfunction

  task automatic cmp(string what, int got, int exp, int t);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL t=%0d %s: got %0d expected %0d", t, what, got, exp);
    end
  endtask

  initial begin
    start = 0; ra = 0; rb = 0; rd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int c = 0; c < 12; c++) begin
      int a, b, d, t;
      a = $urandom_range(NREG - 1, 0); b = $urandom_range(NREG - 1, 0); d = $urandom_range(NREG - 1, 0);
      repeat ($urandom_range(3, 0)) begin
        @(posedge clk); #1;
        cmp("idle issue", int'(ctrl.issue), 0, -1);
      end
      start = 1; ra = RW'(a); rb = RW'(b); rd = RW'(d);
      @(posedge clk); #1;
      start = 0; ra = '1; rb = '1; rd = '1;   // operands are sampled at start only
      t = 0;
      while (!done && t < 4 * N + 6 * L + 40) begin
        exp_t e;
        e = expect_at(t, a, b, d);
        cmp("busy", int'(busy), 1, t);
        cmp("issue", int'(ctrl.issue), int'(e.issue), t);
        cmp("cox_init", int'(cox_init), int'(e.init), t);
        cmp("cox_add", int'(cox_add), int'(e.add), t);
        if (e.init) cmp("cox_alpha", int'(cox_alpha), e.alpha, t);
        if (e.issue) begin
          cmp("acc", int'(ctrl.acc), int'(e.acc), t);
          cmp("base_p", int'(ctrl.base_p), int'(e.base_p), t);
          cmp("asrc", int'(ctrl.asrc), int'(e.asrc), t);
          cmp("b_addr", int'(ctrl.b_addr), e.b_addr, t);
          cmp("wr", int'(ctrl.wr), int'(e.wr), t);
          if (e.asrc == ASRC_MEM) cmp("a_addr", int'(ctrl.a_addr), e.a_addr, t);
          if (e.wr) cmp("wr_addr", int'(ctrl.wr_addr), e.wr_addr, t);
          if (e.asrc == ASRC_BCAST) begin
            cmp("bc_idx", int'(bc_idx), e.bc_i, t);
            cmp("bc_addr", int'(bc_addr), e.bc_a, t);
          end
        end
        @(posedge clk); #1;
        t++;
      end
      cmp("done cycle", t, 2 * N + 4 * L + 7, t);
      cmp("done", int'(done), 1, t);
      @(posedge clk); #1;
      cmp("busy after done", int'(busy), 0, t);
      cmp("done pulse", int'(done), 0, t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
