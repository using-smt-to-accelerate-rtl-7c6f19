// tb_svt_cpuid_bench: the nested cpuid micro-benchmark on the SVT core.
//
// L2 (context 2) executes cpuid in a loop. Each execution is handled the
// nested way, with SVT switches instead of register save/restore:
//   L2 cpuid traps to L0 (context 0); L0 loads vmcs01 and resumes L1
//   (context 1); L1's handler touches a VMCS field, which traps to L0 and is
//   resumed (the extra L1 exit of a nested handler); L1 reads L2's rax and
//   RIP with ctxtld, writes the result registers and the advanced RIP with
//   ctxtst and issues VM resume, which traps to L0; L0 loads vmcs02 and
//   resumes L2, which reads the result.
// Handler bodies are stood in for by idle cycles. The bench checks the
// results of every iteration and measures the cycles lost to context
// switches: each of the six switches per iteration must cost exactly one
// fetch cycle, and no register is moved through memory (all guest register
// traffic is cross-context accesses, counted and checked).
module tb_svt_cpuid_bench;
  import svt_pkg::*;
  localparam int ITER = 200, L0_WORK = 20, L1_WORK = 10;

  logic          clk = 0, rst_n = 0;
  logic          op_valid, op_squashed, irq, fetch_ready, fetch_valid, flush;
  svt_op_t       op;
  logic [63:0]   irq_pc, fetch_pc, rd_data;
  ctx_id_t       fetch_ctx, exit_ctx, cur_ctx;
  logic          rd_valid, exit_valid, fault, is_vm;
  svt_exit_e     exit_reason;
  logic [2:0]    ctx_active;

  svt_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int flushes = 0, nofetch = 0, xaccess = 0, cycles = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (flush) flushes++;
    if (!fetch_valid) nofetch++;
    if (op_valid && op.kind inside {OP_CTXTLD, OP_CTXTST} && !exit_valid && !fault) xaccess++;
  end

  function automatic svt_op_t mk(svt_op_e k, int c, int lvl = 0, int r = 0,
                                 logic [63:0] d = 0, logic [63:0] pc = 0);
    svt_op_t o = '0;
    o.kind = k; o.ctx = ctx_id_t'(c); o.lvl = 2'(lvl); o.reg_idx = 5'(r); o.data = d; o.pc = pc;
    return o;
  endfunction
  function automatic svt_op_t ld(int c, svt_ctx_t fv, svt_ctx_t fm, svt_ctx_t fn);
    svt_op_t o = mk(OP_VMPTRLD, c);
    o.f_visor = fv; o.f_vm = fm; o.f_nested = fn;
    return o;
  endfunction
  localparam svt_ctx_t C0 = '{valid: 1'b1, id: 4'd0};
  localparam svt_ctx_t C1 = '{valid: 1'b1, id: 4'd1};
  localparam svt_ctx_t C2 = '{valid: 1'b1, id: 4'd2};

  // issue one operation; returns read data (one cycle later) for reads
  task automatic issue(svt_op_t o, output logic [63:0] rd);
    @(negedge clk);
    op_valid = 1; op = o;
    @(negedge clk);
    op_valid = 0;
    rd = rd_data;
  endtask
  task automatic idle(int n);
    @(negedge clk); op_valid = 0;
    repeat (n - 1) @(negedge clk);
  endtask
  task automatic expect_ctx(int c, logic vm, string where);
    #1 check(cur_ctx === ctx_id_t'(c) && is_vm === vm, where);
  endtask

  logic [63:0] d, leaf, rip;
  int f0, n0, c0;

  initial begin
    op_valid = 0; op = '0; irq = 0; irq_pc = 0; fetch_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // set-up: L0 starts L1 in context 1, which is given L2 in context 2
    issue(ld(0, C0, C1, C2), d);
    issue(mk(OP_CTXTST, 0, 2, 31, 64'h3000), d);
    issue(mk(OP_CTXTST, 0, 2, 0, 64'h0), d);
    issue(ld(0, C0, C2, CTX_INVALID), d);
    issue(mk(OP_VMRESUME, 0, 0, 0, 0, 64'h100), d);
    expect_ctx(2, 1, "L2 running");
    f0 = flushes; n0 = nofetch; c0 = cycles;
    for (int it = 0; it < ITER; it++) begin
      // L2: rax = leaf, cpuid
      issue(mk(OP_WR, 2, 0, 0, 64'(it)), d);
      issue(mk(OP_RD, 2, 0, 31), rip);                        // own RIP
      issue(mk(OP_VMTRAP, 2, 0, 0, 0, rip), d);               // cpuid
      expect_ctx(0, 0, "cpuid traps to L0");
      idle(L0_WORK);
      issue(ld(0, C0, C1, C2), d);                            // reflect to L1
      issue(mk(OP_VMRESUME, 0, 0, 0, 0, 64'h100), d);
      expect_ctx(1, 1, "L1 handles");
      issue(mk(OP_VMTRAP, 1, 0, 0, 0, 64'h2000), d);          // VMCS field access exit
      expect_ctx(0, 0, "L1 exit");
      issue(mk(OP_VMRESUME, 0, 0, 0, 0, 64'h100), d);
      issue(mk(OP_CTXTLD, 1, 1, 0), leaf);
      check(leaf === 64'(it), "L1 reads L2's leaf");
      issue(mk(OP_CTXTLD, 1, 1, 31), rip);
      idle(L1_WORK);
      issue(mk(OP_CTXTST, 1, 1, 0, leaf * 3 + 64'h47), d);    // eax
      issue(mk(OP_CTXTST, 1, 1, 3, ~leaf), d);                // ebx
      issue(mk(OP_CTXTST, 1, 1, 31, rip + 2), d);             // skip cpuid
      issue(mk(OP_VMRESUME, 1, 0, 0, 0, 64'h2010), d);
      expect_ctx(0, 0, "L1 resume traps");
      issue(ld(0, C0, C2, CTX_INVALID), d);
      issue(mk(OP_VMRESUME, 0, 0, 0, 0, 64'h100), d);
      expect_ctx(2, 1, "back in L2");
      #1 check(fetch_pc === rip + 2, "L2 resumes after cpuid");
      issue(mk(OP_RD, 2, 0, 0), d);
      check(d === leaf * 3 + 64'h47, "eax result");
      issue(mk(OP_RD, 2, 0, 3), d);
      check(d === ~leaf, "ebx result");
    end
    // 6 switches per iteration, each costing exactly one cycle without fetch
    check(flushes - f0 === 6 * ITER, $sformatf("switches %0d exp %0d", flushes - f0, 6 * ITER));
    check(nofetch - n0 === flushes - f0, "one lost fetch cycle per switch");
    check(xaccess === 2 + 5 * ITER, $sformatf("cross-context accesses %0d", xaccess));
    $display("cpuid iterations %0d: %0d cycles, %0d switches, %0d fetch cycles lost to switches",
             ITER, cycles - c0, flushes - f0, nofetch - n0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
