// tb_rower: self-checking test of one Rower (ALU + local memory).
//
// The host loads two random moduli (bases B and B') and fills the memory
// with random residues. Random operation chains are then issued with
// operand A from memory, from the broadcast input or from the Cox input,
// in either base, accumulating or not, some writing back into memory. A
// reference model (64-bit modular arithmetic and a copy of the memory,
// updated at the cycle the Rower must write) predicts every written result;
// each cycle the broadcast port reads either a random word or the word
// written last, so results and their write cycle are both checked. At the end the whole memory is read through the host port
// and compared.
module tb_rower;
  import cr_pkg::*;
  localparam int unsigned R     = 17;
  localparam int unsigned N     = 4;
  localparam int unsigned NREG  = 4;
  localparam int unsigned DEPTH = mem_depth(N, NREG);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  rower_ctrl_t   ctrl;
  logic [R-1:0]  bcast, cox_k, bc_data, hw_data, hr_data;
  logic [AW-1:0] bc_addr, hw_addr, hr_addr;
  logic          hw_en;

  rower #(.R(R), .N(N), .NREG(NREG)) dut (.*);

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

  longint model [DEPTH];
  longint m [2], rinv [2];

  typedef struct { longint z; longint due; logic wr; int addr; } exp_t;
  exp_t q[$];
  int nwb = 0, nsrc[3] = '{0, 0, 0};

  // Applies each write-back to the model in the cycle the Rower must write it.
  int last_wr = 0;
  always @(posedge clk) if (rst_n) begin
    while (q.size() != 0 && q[0].due == cycle) begin
      exp_t e;
      e = q.pop_front();
      if (e.wr) begin model[e.addr] = e.z; nwb++; last_wr = e.addr; end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(int addr, longint val);
    hw_en = 1; hw_addr = AW'(addr); hw_data = R'(val); model[addr] = val;
    @(posedge clk); #1;
    hw_en = 0;
  endtask

  longint mz;
  initial begin
    ctrl = '0; bcast = 0; cox_k = 0; bc_addr = 0; hw_en = 0; hw_addr = 0; hw_data = 0; hr_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int round = 0; round < 20; round++) begin
      // moduli of base B and B'
      for (int bp = 0; bp < 2; bp++) begin
        longint mu;
        mu = longint'($urandom_range(2114, 1) | 1);
        m[bp] = (longint'(1) << R) - mu;
        rinv[bp] = inv_mod((longint'(1) << R) % m[bp], m[bp]);
        host_write(bp ? int'(A_MU_BP) : int'(A_MU_B), mu);
        host_write(bp ? int'(A_MNI_BP) : int'(A_MNI_B),
                   (longint'(1) << R) - inv_mod(m[bp], longint'(1) << R));
      end
      for (int a = 0; a < int'(DEPTH); a++)
        if (a < int'(A_MU_B) || a > int'(A_MNI_BP))
          host_write(a, longint'($urandom) % (m[0] < m[1] ? m[0] : m[1]));
      // random operation chains
      for (int ch = 0; ch < 60; ch++) begin
        int len;
        logic bp;
        bp  = 1'($urandom);
        len = $urandom_range(5, 1);
        for (int k = 0; k < len; k++) begin
          longint av, bv, prod;
          int aa, ba;
          ctrl        = '0;
          ctrl.issue  = 1;
          ctrl.acc    = (k != 0);
          ctrl.base_p = bp;
          aa = $urandom_range(DEPTH - 1, 0);
          ba = $urandom_range(DEPTH - 1, 0);
          if (ba >= int'(A_MU_B) && ba <= int'(A_MNI_BP)) ba = 0;
          ctrl.a_addr = AW'(aa);
          ctrl.b_addr = AW'(ba);
          bcast = R'($urandom);
          cox_k = R'($urandom_range(N, 0));
          case ($urandom_range(2, 0))
            0: begin ctrl.asrc = ASRC_MEM;   av = model[aa];     nsrc[0]++; end
            1: begin ctrl.asrc = ASRC_BCAST; av = longint'(bcast); nsrc[1]++; end
            default: begin ctrl.asrc = ASRC_COX; av = longint'(cox_k); nsrc[2]++; end
          endcase
          bv = model[ba];
          prod = ((av * bv) % m[bp]) * rinv[bp] % m[bp];
          mz = ctrl.acc ? (mz + prod) % m[bp] : prod;
          ctrl.wr = (k == len - 1) && ($urandom_range(3, 0) != 0);
          // write only into scratch and register words, values stay < min(m, m')
          ctrl.wr_addr = AW'($urandom_range(DEPTH - 1, int'(A_TX)));
          if (ctrl.wr && mz >= (m[0] < m[1] ? m[0] : m[1])) ctrl.wr = 0;
          q.push_back('{z: mz, due: cycle + longint'(ALU_LAT), wr: ctrl.wr, addr: int'(ctrl.wr_addr)});
          bc_addr = ($urandom_range(1, 0) == 1) ? AW'(last_wr) : AW'($urandom_range(DEPTH - 1, 0));
          #1;
          checks++;
          if (longint'(bc_data) != model[bc_addr]) begin
            failures++; $display("FAIL: bc_data[%0d]=%0d exp %0d", bc_addr, bc_data, model[bc_addr]);
          end
          @(posedge clk); #1;
        end
        ctrl = '0;
        repeat ($urandom_range(1, 0)) begin @(posedge clk); #1; end
      end
      repeat (ALU_LAT + 2) begin @(posedge clk); #1; end
      for (int a = 0; a < int'(DEPTH); a++) begin
        hr_addr = AW'(a);
        #1;
        checks++;
        if (longint'(hr_data) != model[a]) begin
          failures++; $display("FAIL: mem[%0d]=%0d exp %0d", a, hr_data, model[a]);
        end
      end
    end
    checks++;
    if (nwb == 0 || nsrc[0] == 0 || nsrc[1] == 0 || nsrc[2] == 0 || q.size() != 0) begin
      failures++; $display("FAIL: coverage wb=%0d src=%0d/%0d/%0d left=%0d", nwb, nsrc[0], nsrc[1], nsrc[2], q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
