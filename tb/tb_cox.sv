// tb_cox: self-checking test of the Cox unit.
//
// Runs many base-extension-like sequences: init with a random alpha (and
// with 0), then n adds of random xi values, some of them with all bits set,
// with random gaps. After each add the integer output is compared with
// floor((alpha + sum of the top q bits of each xi) / 2^q) computed here
// with plain integers. Also checks that init has priority over add.
module tb_cox;
  localparam int unsigned R  = 17;
  localparam int unsigned Q  = 7;
  localparam int unsigned N  = 31;
  localparam int unsigned KW = $clog2(N + 1) + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          init, add;
  logic [Q-1:0]  init_alpha;
  logic [R-1:0]  xi;
  logic [KW-1:0] k;

  cox #(.R(R), .Q(Q), .N(N)) dut (.*);

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int unsigned exp_k);
    checks++;
    if (k !== KW'(exp_k)) begin
      failures++;
      $display("FAIL: k=%0d expected %0d", k, exp_k);
    end
  endtask

  int unsigned sum, maxk = 0;
  initial begin
    init = 0; add = 0; init_alpha = 0; xi = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int t = 0; t < 800; t++) begin
      init = 1;
      init_alpha = (t % 3 == 0) ? '0 : Q'($urandom);
      add = (t % 5 == 0);                // init must win
      xi = R'($urandom);
      sum = init_alpha;
      @(posedge clk); #1;
      init = 0;
      check(sum >> Q);
      for (int i = 0; i < N; i++) begin
        add = 1;
        xi = (t % 4 == 1) ? '1 : R'($urandom);
        sum += xi >> (R - Q);
        @(posedge clk); #1;
        add = 0;
        check(sum >> Q);
        if ((sum >> Q) > maxk) maxk = sum >> Q;
        if ($urandom_range(3, 0) == 0) begin
          xi = '1;                       // ignored without add
          @(posedge clk); #1;
          check(sum >> Q);
        end
      end
    end
    checks++;
    if (maxk < N - 1) begin failures++; $display("FAIL: largest k only %0d", maxk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
