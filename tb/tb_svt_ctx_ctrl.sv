// tb_svt_ctx_ctrl: the SVT switch rules, first as the directed sequence of a
// nested trap (L0 in context 0 configures and starts L1 in context 1, L1
// configures L2, which L0 runs in context 2; L2 traps, L0 reflects to L1, L1
// resumes, an interrupt arrives), then as random operations compared with a
// model of SVt_current, is_vm and the cached fields written from the rules.
// Each switch must take effect at the next clock edge (one cycle).
module tb_svt_ctx_ctrl;
  import svt_pkg::*;
  localparam int unsigned NUM_CTX = 3;

  logic        clk = 0, rst_n = 0;
  logic        ev_valid, xctx_trap, irq;
  svt_op_t     ev;
  logic [63:0] irq_pc, sw_pc;
  ctx_id_t     cur, sw_from, sw_to;
  logic        is_vm, sw_valid, exit_valid, fault;
  svt_ctx_t    visor, vm, nested;
  logic [31:0] trap_mask;
  svt_exit_e   exit_reason;
  int checks = 0, failures = 0;

  // model
  ctx_id_t  m_cur;
  logic     m_isvm;
  svt_ctx_t m_visor, m_vm, m_nested;

  svt_ctx_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  function automatic svt_ctx_t C(int id);
    return (id < 0) ? CTX_INVALID : '{valid: 1'b1, id: ctx_id_t'(id)};
  endfunction

  // Apply one operation for one cycle; check the combinational outputs
  // against the expectation and the state after the clock edge.
  task automatic step(svt_op_e k, logic [63:0] pc, logic xt, logic ir,
                      logic e_sw, ctx_id_t e_to, svt_exit_e e_exit, logic e_fault,
                      logic [63:0] e_pc);
    @(negedge clk);
    ev = '0; ev.kind = k; ev.pc = pc; ev_valid = (k != OP_NONE);
    xctx_trap = xt; irq = ir; irq_pc = 64'hABCD_0000 + pc;
    #1;
    check(sw_valid === e_sw, $sformatf("sw_valid %0d exp %0d kind %s", sw_valid, e_sw, k.name()));
    check(exit_reason === e_exit, $sformatf("exit %s exp %s", exit_reason.name(), e_exit.name()));
    check(fault === e_fault, "fault");
    if (e_sw) begin
      check(sw_to === e_to, $sformatf("sw_to %0d exp %0d", sw_to, e_to));
      check(sw_pc === e_pc, "sw_pc");
    end
    @(posedge clk); #1;
    if (e_sw) check(cur === e_to, "cur switched after one cycle");
    ev_valid = 0; irq = 0; xctx_trap = 0;
  endtask

  task automatic load(svt_ctx_t fv, svt_ctx_t fm, svt_ctx_t fn);
    @(negedge clk);
    ev = '0; ev.kind = OP_VMPTRLD; ev.f_visor = fv; ev.f_vm = fm; ev.f_nested = fn;
    ev_valid = 1; irq = 0; xctx_trap = 0;
    @(posedge clk); #1;
    ev_valid = 0;
  endtask

  initial begin
    ev_valid = 0; ev = '0; xctx_trap = 0; irq = 0; irq_pc = 0;
    repeat (2) @(negedge clk);
    #1;
    check(cur === 0 && !is_vm && !vm.valid && !visor.valid && !nested.valid, "reset state");
    rst_n = 1;
    // L0 (ctx0) loads vmcs01: visor=0 vm=1 nested=invalid
    load(C(0), C(1), C(-1));
    check(vm === C(1) && visor === C(0) && !nested.valid, "vmcs01 cached");
    step(OP_VMTRAP, 64'h100, 0, 0, 0, 0, EXIT_NONE, 0, 0);            // native in L0
    step(OP_VMRESUME, 64'h104, 0, 0, 1, 1, EXIT_NONE, 0, 64'h104);     // start L1
    check(is_vm, "is_vm after resume");
    // L1 loads its vmcs01' -> traps to L0
    step(OP_VMPTRLD, 64'h2000, 0, 0, 1, 0, EXIT_VMPTRLD, 0, 64'h2000);
    check(!is_vm && vm === C(1), "guest VMPTRLD did not load");
    // L0 writes nested=2 into vmcs01 and resumes L1
    load(C(0), C(1), C(2));
    step(OP_VMRESUME, 64'h108, 0, 0, 1, 1, EXIT_NONE, 0, 64'h108);
    // L1 VM resume for L2 -> trap
    step(OP_VMRESUME, 64'h2010, 0, 0, 1, 0, EXIT_VMRESUME, 0, 64'h2010);
    // L0 loads vmcs02 (visor 0, vm 2), resumes L2 in ctx 2
    load(C(0), C(2), C(-1));
    step(OP_VMRESUME, 64'h10C, 0, 0, 1, 2, EXIT_NONE, 0, 64'h10C);
    // L2 cpuid -> trap to L0
    step(OP_VMTRAP, 64'h3000, 0, 0, 1, 0, EXIT_INSN, 0, 64'h3000);
    // L0 reflects: loads vmcs01 and resumes L1
    load(C(0), C(1), C(2));
    step(OP_VMRESUME, 64'h110, 0, 0, 1, 1, EXIT_NONE, 0, 64'h110);
    // L1 cross-context access refused -> trap
    step(OP_CTXTLD, 64'h2020, 1, 0, 1, 0, EXIT_XCTX, 0, 64'h2020);
    step(OP_VMRESUME, 64'h114, 0, 0, 1, 1, EXIT_NONE, 0, 64'h114);
    // interrupt while in L1 -> asynchronous trap
    step(OP_NONE, 64'h0, 0, 1, 1, 0, EXIT_IRQ, 0, 64'hABCD_0000);
    // interrupt in L0 -> no trap
    step(OP_NONE, 64'h0, 0, 1, 0, 0, EXIT_NONE, 0, 0);
    // switching op wins over an interrupt in the same cycle
    step(OP_VMRESUME, 64'h118, 0, 1, 1, 1, EXIT_NONE, 0, 64'h118);
    // VM resume with invalid SVt_vm in L0 faults
    step(OP_VMTRAP, 64'h2030, 0, 0, 1, 0, EXIT_INSN, 0, 64'h2030);
    load(C(0), C(-1), C(-1));
    step(OP_VMRESUME, 64'h11C, 0, 0, 0, 0, EXIT_NONE, 1, 0);
    // out-of-range id stored as invalid
    load(C(0), C(7), C(1));
    check(!vm.valid && nested === C(1), "out-of-range id invalid");

    // ---- random phase against the model
    rst_n = 0; @(negedge clk); rst_n = 1;
    m_cur = 0; m_isvm = 0; m_visor = CTX_INVALID; m_vm = CTX_INVALID; m_nested = CTX_INVALID;
    for (int n = 0; n < 3000; n++) begin
      svt_exit_e e_exit;
      logic e_sw, e_fault, e_load;
      ctx_id_t e_to;
      @(negedge clk);
      ev = '0;
      ev.kind = svt_op_e'($urandom_range(0, 7));
      ev.pc = {$urandom, $urandom};
      ev.f_visor  = '{valid: $urandom_range(0, 7) != 0, id: ctx_id_t'($urandom_range(0, 4))};
      ev.f_vm     = '{valid: $urandom_range(0, 7) != 0, id: ctx_id_t'($urandom_range(0, 4))};
      ev.f_nested = '{valid: $urandom_range(0, 7) != 0, id: ctx_id_t'($urandom_range(0, 4))};
      ev_valid = $urandom_range(0, 3) != 0;
      xctx_trap = $urandom_range(0, 1);
      irq = $urandom_range(0, 7) == 0;
      irq_pc = {$urandom, $urandom};
      // expected behaviour, straight from the rules
      e_exit = EXIT_NONE; e_sw = 0; e_fault = 0; e_load = 0; e_to = m_cur;
      if (ev_valid) begin
        if (ev.kind == OP_VMPTRLD)  begin if (m_isvm) e_exit = EXIT_VMPTRLD; else e_load = 1; end
        if (ev.kind == OP_VMRESUME) begin
          if (m_isvm) e_exit = EXIT_VMRESUME;
          else if (m_vm.valid) begin e_sw = 1; e_to = m_vm.id; end
          else e_fault = 1;
        end
        if (ev.kind == OP_VMTRAP && m_isvm) e_exit = EXIT_INSN;
        if ((ev.kind == OP_CTXTLD || ev.kind == OP_CTXTST) && xctx_trap) e_exit = EXIT_XCTX;
      end
      if (e_exit == EXIT_NONE && !e_sw && irq && m_isvm) e_exit = EXIT_IRQ;
      if (e_exit != EXIT_NONE) begin e_sw = 1; e_to = m_visor.valid ? m_visor.id : '0; end
      #1;
      check(cur === m_cur && is_vm === m_isvm, "state");
      check(sw_valid === e_sw && exit_reason === e_exit && fault === e_fault, "outputs");
      if (e_sw) check(sw_to === e_to && sw_from === m_cur, "switch target");
      if (e_sw) check(sw_pc === ((e_exit === EXIT_IRQ) ? irq_pc : ev.pc), "restart pc");
      if (e_load) begin
        m_visor  = (ev.f_visor.valid  && ev.f_visor.id  < NUM_CTX) ? ev.f_visor  : CTX_INVALID;
        m_vm     = (ev.f_vm.valid     && ev.f_vm.id     < NUM_CTX) ? ev.f_vm     : CTX_INVALID;
        m_nested = (ev.f_nested.valid && ev.f_nested.id < NUM_CTX) ? ev.f_nested : CTX_INVALID;
      end
      if (e_sw) begin m_cur = e_to; m_isvm = (e_exit == EXIT_NONE); end
      @(posedge clk); #1;
      check(visor === m_visor && vm === m_vm && nested === m_nested, "cached fields");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
