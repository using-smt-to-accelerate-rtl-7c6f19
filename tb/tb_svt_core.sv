// tb_svt_core: end-to-end test of the SVT core at its default size.
//
// A reference model of the architecture (SVt_current, is_vm, the cached
// fields, every context's registers and PC) runs beside the design; every
// cycle the design's fetch, flush, trap, fault, squash and read outputs are
// compared with it. The directed part walks a complete nested trap:
//   L0 (context 0) sets up L1 in context 1 with ctxtst and starts it; L1's
//   VMCS load traps; L0 gives L1 access to context 2 and resumes it; L1 fills
//   L2's registers with ctxtst (one masked register traps and L0 emulates it
//   with a level-2 store, then advances L1's PC); L1's VM resume traps; L0
//   runs L2 in context 2; L2 executes cpuid and traps; L0 reflects to L1; L1
//   reads L2's state, writes the cpuid result and advances L2's PC; L2 resumes
//   and sees the result; an interrupt then traps L2 to L0.
// A random part follows. Each mechanism is counted and one that never
// happened is a failure. A switch must take exactly one cycle: the cycle
// after a flush fetches from the new context.
module tb_svt_core;
  import svt_pkg::*;
  localparam int unsigned NUM_CTX = 3, NUM_ARCH = 16, NUM_PHYS = 168, FB = 16;

  logic          clk = 0, rst_n = 0;
  logic          op_valid, op_squashed, irq, fetch_ready, fetch_valid, flush;
  svt_op_t       op;
  logic [63:0]   irq_pc, fetch_pc, rd_data;
  ctx_id_t       fetch_ctx, exit_ctx, cur_ctx;
  logic          rd_valid, exit_valid, fault, is_vm;
  svt_exit_e     exit_reason;
  logic [NUM_CTX-1:0] ctx_active;

  svt_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  // ------------------------------------------------------------ model
  ctx_id_t     m_cur;
  logic        m_isvm;
  svt_ctx_t    m_visor, m_vm, m_nested;
  logic [31:0] m_mask;
  logic [63:0] m_reg [NUM_CTX][NUM_ARCH];
  logic [63:0] m_pc  [NUM_CTX];
  logic        m_rdv;
  logic [63:0] m_rdd;
  logic        m_switched;   // previous cycle had a switch

  // mechanism counters
  typedef enum int {
    M_RESUME, M_TRAP_INSN, M_TRAP_VMPTRLD, M_TRAP_VMRESUME, M_TRAP_XMASK,
    M_TRAP_XILL, M_TRAP_IRQ, M_FAULT_X, M_FAULT_REG, M_FAULT_RESUME, M_SQUASH,
    M_X_HOST1, M_X_HOST2, M_X_GUEST1, M_X_PC, M_OWN_WR, M_OWN_RD, M_LOAD,
    M_SWITCH_1CYC, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"vm_resume", "trap_insn", "trap_vmptrld", "trap_vmresume",
    "trap_xctx_mask", "trap_xctx_level", "trap_irq", "fault_xctx_host", "fault_reg_index",
    "fault_resume", "squash", "xctx_host_lvl1", "xctx_host_lvl2", "xctx_guest_lvl1",
    "xctx_pc", "own_write", "own_read", "vmcs_load", "switch_one_cycle"};
  int writes = 0;

  function automatic svt_ctx_t C(int id);
    return (id < 0) ? CTX_INVALID : '{valid: 1'b1, id: ctx_id_t'(id)};
  endfunction

  // One cycle: drive op/irq, compare everything, advance the model.
  task automatic cyc(logic v, svt_op_t o, logic ir = 0, logic [63:0] ipc = 0);
    logic       act, xil, xtr, e_sw, e_fault, e_rd, e_wr, e_load;
    svt_exit_e  e_exit;
    ctx_id_t    e_to, tgt;
    svt_ctx_t   sel;
    logic [63:0] e_swpc;
    bit         own, xc, ok;
    @(negedge clk);
    // read result of the previous cycle
    check(rd_valid === m_rdv, "rd_valid");
    if (m_rdv) check(rd_data === m_rdd, $sformatf("rd_data %h exp %h", rd_data, m_rdd));
    op_valid = v; op = o; irq = ir; irq_pc = ipc;
    fetch_ready = $urandom_range(0, 3) != 0;
    #1;
    // --- expectation
    act = v && (o.ctx == m_cur);
    own = o.kind inside {OP_RD, OP_WR};
    xc  = o.kind inside {OP_CTXTLD, OP_CTXTST};
    ok  = (o.reg_idx == 5'd31) || (o.reg_idx < NUM_ARCH);
    e_exit = EXIT_NONE; e_sw = 0; e_fault = 0; e_rd = 0; e_wr = 0; e_load = 0;
    e_to = m_cur; e_swpc = o.pc; tgt = m_cur; xil = 0; xtr = 0; sel = CTX_INVALID;
    if (act) begin
      if ((own || xc) && !ok) e_fault = 1;
      if (xc && ok) begin
        if (!m_isvm && o.lvl == 1) sel = m_vm;
        else if (!m_isvm && o.lvl == 2) sel = m_nested;
        else if (m_isvm && o.lvl == 1) sel = m_nested;
        xil = !sel.valid;
        xtr = m_isvm && (xil || m_mask[o.reg_idx]);
        if (xil && !m_isvm) e_fault = 1;
        if (xtr) e_exit = EXIT_XCTX;
        tgt = sel.id;
        if (!xil && !xtr) begin e_rd = (o.kind == OP_CTXTLD); e_wr = (o.kind == OP_CTXTST); end
      end
      if (own && ok) begin e_rd = (o.kind == OP_RD); e_wr = (o.kind == OP_WR); end
      case (o.kind)
        OP_VMPTRLD:  if (m_isvm) e_exit = EXIT_VMPTRLD; else e_load = 1;
        OP_VMRESUME: if (m_isvm) e_exit = EXIT_VMRESUME;
                     else if (m_vm.valid) begin e_sw = 1; e_to = m_vm.id; end
                     else e_fault = 1;
        OP_VMTRAP:   if (m_isvm) e_exit = EXIT_INSN;
        default: ;
      endcase
    end
    if (e_exit == EXIT_NONE && !e_sw && ir && m_isvm) begin e_exit = EXIT_IRQ; e_swpc = ipc; end
    if (e_exit != EXIT_NONE) begin e_sw = 1; e_to = m_visor.valid ? m_visor.id : '0; end
    // --- compare
    check(cur_ctx === m_cur && is_vm === m_isvm, $sformatf("state cur %0d/%0d is_vm %0d/%0d", cur_ctx, m_cur, is_vm, m_isvm));
    check(ctx_active === NUM_CTX'(1 << m_cur), "ctx_active");
    check(op_squashed === (v && o.ctx != m_cur), "op_squashed");
    check(flush === e_sw && exit_valid === (e_exit != EXIT_NONE) && exit_reason === e_exit,
          $sformatf("flush %0d/%0d exit %s/%s", flush, e_sw, exit_reason.name(), e_exit.name()));
    if (exit_valid) check(exit_ctx === m_cur, "exit_ctx");
    check(fault === e_fault, $sformatf("fault %0d exp %0d", fault, e_fault));
    check(fetch_valid === !e_sw && fetch_ctx === m_cur, "fetch select");
    check(fetch_pc === m_pc[m_cur], $sformatf("fetch_pc %h exp %h", fetch_pc, m_pc[m_cur]));
    if (m_switched) begin
      mech[M_SWITCH_1CYC]++;
      check(fetch_ctx === m_cur && (fetch_valid || e_sw), "new context fetches one cycle after the switch");
    end
    // --- counters
    if (v && o.ctx != m_cur) mech[M_SQUASH]++;
    if (act && o.kind == OP_VMRESUME && e_sw && e_exit == EXIT_NONE) mech[M_RESUME]++;
    case (e_exit)
      EXIT_INSN: mech[M_TRAP_INSN]++;
      EXIT_VMPTRLD: mech[M_TRAP_VMPTRLD]++;
      EXIT_VMRESUME: mech[M_TRAP_VMRESUME]++;
      EXIT_XCTX: if (xil) mech[M_TRAP_XILL]++; else mech[M_TRAP_XMASK]++;
      EXIT_IRQ: mech[M_TRAP_IRQ]++;
      default: ;
    endcase
    if (act && xc && ok && xil && !m_isvm) mech[M_FAULT_X]++;
    if (act && (own || xc) && !ok) mech[M_FAULT_REG]++;
    if (act && o.kind == OP_VMRESUME && !m_isvm && !m_vm.valid) mech[M_FAULT_RESUME]++;
    if ((e_rd || e_wr) && xc) begin
      if (!m_isvm && o.lvl == 1) mech[M_X_HOST1]++;
      if (!m_isvm && o.lvl == 2) mech[M_X_HOST2]++;
      if (m_isvm) mech[M_X_GUEST1]++;
      if (o.reg_idx == 5'd31) mech[M_X_PC]++;
    end
    if (own && e_wr) mech[M_OWN_WR]++;
    if (own && e_rd) mech[M_OWN_RD]++;
    if (e_load) mech[M_LOAD]++;
    // --- advance model (same order as the hardware: fetch, PC write, switch)
    m_rdv = e_rd;
    if (e_rd) m_rdd = (o.reg_idx == 5'd31) ? m_pc[tgt] : m_reg[tgt][o.reg_idx[3:0]];
    if (!e_sw && fetch_ready) m_pc[m_cur] = m_pc[m_cur] + FB;
    if (e_wr && o.reg_idx == 5'd31) m_pc[tgt] = o.data;
    if (e_wr && o.reg_idx != 5'd31) begin m_reg[tgt][o.reg_idx[3:0]] = o.data; writes++; end
    if (e_sw) m_pc[m_cur] = e_swpc;
    if (e_load) begin m_visor = o.f_visor; m_vm = o.f_vm; m_nested = o.f_nested; m_mask = o.trap_mask; end
    m_switched = e_sw;
    if (e_sw) begin m_cur = e_to; m_isvm = (e_exit == EXIT_NONE); end
    @(posedge clk);
  endtask

  // operation builders
  function automatic svt_op_t mk(svt_op_e k, int c, int lvl = 0, int r = 0,
                                 logic [63:0] d = 0, logic [63:0] pc = 0);
    svt_op_t o = '0;
    o.kind = k; o.ctx = ctx_id_t'(c); o.lvl = 2'(lvl); o.reg_idx = 5'(r); o.data = d; o.pc = pc;
    return o;
  endfunction
  function automatic svt_op_t ld(int c, int fv, int fm, int fn, logic [31:0] mask = 0);
    svt_op_t o = mk(OP_VMPTRLD, c);
    o.f_visor = C(fv); o.f_vm = C(fm); o.f_nested = C(fn); o.trap_mask = mask;
    return o;
  endfunction

  logic [63:0] t;

  initial begin
    op_valid = 0; op = '0; irq = 0; irq_pc = 0; fetch_ready = 0;
    m_cur = 0; m_isvm = 0; m_visor = CTX_INVALID; m_vm = CTX_INVALID; m_nested = CTX_INVALID;
    m_mask = 0; m_rdv = 0; m_rdd = 0; m_switched = 0;
    for (int i = 0; i < M_NUM; i++) mech[i] = 0;
    for (int c = 0; c < NUM_CTX; c++) m_pc[c] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // The hardware's reset register contents are unknown: give every register
    // of every context a value through the design before relying on it.
    for (int r = 0; r < NUM_ARCH; r++) cyc(1, mk(OP_WR, 0, 0, r, 64'h0A00 + r));
    cyc(1, ld(0, 0, 1, 2));
    for (int r = 0; r < NUM_ARCH; r++) cyc(1, mk(OP_CTXTST, 0, 1, r, 64'h1A00 + r));
    for (int r = 0; r < NUM_ARCH; r++) cyc(1, mk(OP_CTXTST, 0, 2, r, 64'h2A00 + r));

    // ---- L0 configures L1: visor 0, vm 1, nested invalid
    cyc(1, ld(0, 0, 1, -1));
    cyc(1, mk(OP_CTXTST, 0, 2, 3, 64'hBAD));            // no nested VM yet: fault
    cyc(1, mk(OP_CTXTST, 0, 1, 0, 64'h1111));           // L1 rax
    cyc(1, mk(OP_CTXTST, 0, 1, 31, 64'h1000));          // L1 RIP
    cyc(1, mk(OP_CTXTLD, 0, 1, 0));
    cyc(1, mk(OP_CTXTLD, 0, 1, 31));
    cyc(1, mk(OP_RD, 0, 0, 20));                        // bad register index: fault
    cyc(1, mk(OP_VMRESUME, 0, 0, 0, 0, 64'h0400));      // start L1
    cyc(1, mk(OP_WR, 0, 0, 1, 64'hDEAD));               // L0 op fetched before the switch: squashed
    cyc(1, mk(OP_RD, 1, 0, 0));                         // L1 sees rax set by L0
    cyc(1, mk(OP_WR, 1, 0, 2, 64'h1222));
    // ---- L1 creates L2: its VMCS load traps to L0
    cyc(1, ld(1, 0, 1, -1), 0, 0);
    cyc(1, mk(OP_CTXTLD, 0, 1, 31));                    // L0 inspects L1's RIP
    cyc(1, ld(0, 0, 1, 2, 32'h0000_0020));              // vmcs01: nested = ctx 2, reg 5 intercepted
    cyc(1, mk(OP_VMRESUME, 0, 0, 0, 0, 64'h0410));
    // ---- L1 fills L2's registers (lvl 1 -> SVt_nested = context 2)
    cyc(1, mk(OP_CTXTST, 1, 1, 0, 64'h2000));
    cyc(1, mk(OP_CTXTST, 1, 1, 31, 64'h3000));
    cyc(1, mk(OP_CTXTLD, 1, 1, 0));
    cyc(1, mk(OP_CTXTST, 1, 2, 0, 64'h0));              // lvl 2 from a guest: trap
    cyc(1, mk(OP_CTXTLD, 0, 1, 31));                    // L0 reads L1's RIP
    t = m_rdd;
    cyc(1, mk(OP_CTXTST, 0, 1, 31, t + 4));             // skip the instruction
    cyc(1, mk(OP_VMRESUME, 0, 0, 0, 0, 64'h0420));
    cyc(1, mk(OP_CTXTST, 1, 1, 5, 64'h5555));           // masked register: trap to L0
    cyc(1, mk(OP_CTXTST, 0, 2, 5, 64'h5555));           // L0 emulates with a level-2 store
    cyc(1, mk(OP_CTXTLD, 0, 1, 31));
    t = m_rdd;
    cyc(1, mk(OP_CTXTST, 0, 1, 31, t + 4));
    cyc(1, mk(OP_VMRESUME, 0, 0, 0, 0, 64'h0430));
    // ---- L1 resumes L2: traps; L0 loads vmcs02 and runs L2 in context 2
    cyc(1, mk(OP_VMRESUME, 1, 0, 0, 0, 64'h1100));
    cyc(1, ld(0, 0, 2, -1));
    cyc(1, mk(OP_VMRESUME, 0, 0, 0, 0, 64'h0440));
    cyc(0, '0);
    cyc(1, mk(OP_RD, 2, 0, 0));
    cyc(1, mk(OP_RD, 2, 0, 5));
    // ---- L2 executes cpuid: trap to L0, reflected to L1
    cyc(1, mk(OP_VMTRAP, 2, 0, 0, 0, 64'h3010));
    cyc(1, ld(0, 0, 1, 2, 32'h0000_0020));
    cyc(1, mk(OP_VMRESUME, 0, 0, 0, 0, 64'h0450));
    cyc(1, mk(OP_CTXTLD, 1, 1, 0));                     // L1 reads L2's rax (leaf)
    cyc(1, mk(OP_CTXTST, 1, 1, 0, 64'h0756_6E65));      // result into rax
    cyc(1, mk(OP_CTXTLD, 1, 1, 31));
    t = m_rdd;
    cyc(1, mk(OP_CTXTST, 1, 1, 31, t + 2));             // past cpuid
    cyc(1, mk(OP_VMRESUME, 1, 0, 0, 0, 64'h1110));      // traps to L0
    cyc(1, ld(0, 0, 2, -1));
    cyc(1, mk(OP_VMRESUME, 0, 0, 0, 0, 64'h0460));
    // the design's fetch_pc and rd_data are compared with these in the next cycles
    check(m_cur === 2 && m_pc[2] === 64'h3012, "L2 restarts after cpuid");
    cyc(1, mk(OP_RD, 2, 0, 0));
    check(m_rdv && m_rdd === 64'h0756_6E65, "L2 sees cpuid result");
    cyc(0, '0);
    // ---- interrupt in L2
    cyc(0, '0, 1, 64'h3040);
    cyc(0, '0, 1, 64'h0);                               // in L0: delivered, no trap
    cyc(1, ld(0, 0, -1, -1));
    cyc(1, mk(OP_VMRESUME, 0, 0, 0, 0, 64'h0470));      // no guest: fault
    cyc(1, ld(0, 0, 2, -1));

    // ---- random traffic
    for (int n = 0; n < 4000; n++) begin
      automatic svt_op_t o;
      automatic int k = $urandom_range(0, 99);
      automatic int c = ($urandom_range(0, 9) == 0) ? $urandom_range(0, NUM_CTX - 1) : int'(m_cur);
      automatic int r = ($urandom_range(0, 15) == 0) ? 31 : $urandom_range(0, NUM_ARCH - 1);
      if (k < 30)      o = mk(OP_WR, c, 0, r, {$urandom, $urandom});
      else if (k < 50) o = mk(OP_RD, c, 0, r);
      else if (k < 62) o = mk(OP_CTXTST, c, $urandom_range(0, 3), r, {$urandom, $urandom});
      else if (k < 74) o = mk(OP_CTXTLD, c, $urandom_range(0, 3), r);
      else if (k < 82) o = ld(c, 0, $urandom_range(1, 2), ($urandom_range(0, 2) == 0) ? -1 : 2,
                              ($urandom_range(0, 3) == 0) ? $urandom : 32'h0);
      else if (k < 92) o = mk(OP_VMRESUME, c, 0, 0, 0, {$urandom, $urandom});
      else             o = mk(OP_VMTRAP, c, 0, 0, 0, {$urandom, $urandom});
      if (r == 31 && o.kind inside {OP_WR, OP_CTXTST}) o.data = {o.data[63:4], 4'h0};
      cyc($urandom_range(0, 7) != 0, o, $urandom_range(0, 31) == 0, {$urandom, $urandom});
    end
    cyc(0, '0);

    // every mechanism must have happened
    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %-18s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mech_name[i]));
    end
    $display("register writes renamed: %0d (free list of %0d cycled)", writes, NUM_PHYS - NUM_CTX * NUM_ARCH);
    check(writes > 2 * (NUM_PHYS - NUM_CTX * NUM_ARCH), "free list wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
