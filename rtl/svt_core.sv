// svt_core: SVT extension of an SMT core (top).
//
// Nested virtualization normally pays a full register save/restore on every
// VM trap and VM resume, and a nested trap costs several of them. SVT keeps
// each virtualization level resident in its own hardware context of an SMT
// core and only ever runs one of them: a VM trap or resume just changes which
// context fetches (SVt_current), and a hypervisor reads and writes its
// guest's registers in place with ctxtld/ctxtst through the guest's rename
// map into the shared physical register file.
//
// Blocks: svt_ctx_ctrl (micro-registers, switch rules), svt_xctx_resolve
// (lvl -> hardware context), svt_fetch_sel (per-context PCs, fetch of the
// active context only), svt_rename_map (per-context maps, shared free list),
// svt_prf (shared physical register file).
//
// Interface: the rest of the pipeline presents, one per cycle in program
// order, each SVT-relevant operation (op_valid/op, see svt_pkg::svt_op_t)
// tagged with the context that issued it. An operation from a context other
// than SVt_current is squashed (op_squashed): it was fetched before a switch.
// That tag check is a guard; the pipeline still discards its in-flight
// operations on flush.
// Reads (OP_RD, OP_CTXTLD) return rd_data with rd_valid one cycle later.
// A context switch raises flush for one cycle (in-flight instructions are
// squashed before the new context fetches), suppresses fetch in that cycle,
// and the new context fetches from the next cycle: a VM trap or resume takes
// one cycle. exit_* reports each VM trap (reason and trapping context) so the
// hypervisor side can record it; fault is an exception raised to the issuing
// context (illegal register index, illegal ctxtld/ctxtst in the host
// hypervisor, VM resume without a valid guest). ctx_active is a one-hot of
// the running context, usable to power-gate the idle ones.
// The operation interface, the one-cycle switch and the register index map
// (31 = instruction pointer) are this design's choices; the switch and
// level-selection rules are the SVT architecture's.
module svt_core
  import svt_pkg::*;
#(
  parameter int unsigned NUM_CTX     = 3,
  parameter int unsigned NUM_ARCH    = 16,
  parameter int unsigned NUM_PHYS    = 168,
  parameter int unsigned FETCH_BYTES = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // operations from the pipeline
  input  logic                op_valid,
  input  svt_op_t             op,
  output logic                op_squashed,
  // external interrupt (all SVT contexts route to this core)
  input  logic                irq,
  input  logic [SVT_XLEN-1:0] irq_pc,
  // instruction fetch
  input  logic                fetch_ready,
  output logic                fetch_valid,
  output logic [SVT_XLEN-1:0] fetch_pc,
  output ctx_id_t             fetch_ctx,
  output logic                flush,
  // register read results
  output logic                rd_valid,
  output logic [SVT_XLEN-1:0] rd_data,
  // VM trap report and exceptions
  output logic                exit_valid,
  output svt_exit_e           exit_reason,
  output ctx_id_t             exit_ctx,
  output logic                fault,
  // micro-architectural state
  output ctx_id_t             cur_ctx,
  output logic                is_vm,
  output logic [NUM_CTX-1:0]  ctx_active
);

  localparam int unsigned AREG_W = $clog2(NUM_ARCH);
  localparam int unsigned PREG_W = $clog2(NUM_PHYS);

  // ---------------------------------------------------------------- decode
  logic     act;
  logic     is_xctx, is_own, is_rd, is_wr, is_pc, reg_ok;
  svt_ctx_t visor, vm, nested;
  logic [31:0] trap_mask;
  ctx_id_t  xtgt, tgt;
  logic     xtrap, xfault;

  assign act         = op_valid && (op.ctx == cur_ctx);
  assign op_squashed = op_valid && (op.ctx != cur_ctx);
  assign is_xctx     = op.kind inside {OP_CTXTLD, OP_CTXTST};
  assign is_own      = op.kind inside {OP_RD, OP_WR};
  assign is_rd       = op.kind inside {OP_RD, OP_CTXTLD};
  assign is_wr       = op.kind inside {OP_WR, OP_CTXTST};
  assign is_pc       = (op.reg_idx == REG_PC);
  assign reg_ok      = is_pc || (32'(op.reg_idx) < NUM_ARCH);

  svt_xctx_resolve u_resolve (
    .is_vm     (is_vm),
    .lvl       (op.lvl),
    .reg_idx   (op.reg_idx),
    .vm        (vm),
    .nested    (nested),
    .trap_mask (trap_mask),
    .tgt       (xtgt),
    .trap      (xtrap),
    .fault     (xfault)
  );

  // --------------------------------------------------------- switch control
  logic                sw_valid;
  ctx_id_t             sw_from, sw_to;
  logic [SVT_XLEN-1:0] sw_pc;
  logic                ctrl_fault;

  svt_ctx_ctrl #(.NUM_CTX(NUM_CTX)) u_ctrl (
    .clk, .rst_n,
    .ev_valid    (act),
    .ev          (op),
    .xctx_trap   (is_xctx && reg_ok && xtrap),
    .irq, .irq_pc,
    .cur         (cur_ctx),
    .is_vm       (is_vm),
    .visor, .vm, .nested, .trap_mask,
    .sw_valid, .sw_from, .sw_to, .sw_pc,
    .exit_valid, .exit_reason,
    .fault       (ctrl_fault)
  );

  assign exit_ctx  = sw_from;
  assign fetch_ctx = cur_ctx;
  assign flush    = sw_valid;

  always_comb begin
    for (int i = 0; i < NUM_CTX; i++) ctx_active[i] = (32'(cur_ctx) == i);
  end

  // ----------------------------------------------------- register accesses
  logic do_acc, do_rd, do_wr;

  assign tgt    = is_xctx ? xtgt : cur_ctx;
  assign do_acc = act && reg_ok && (is_own || (is_xctx && !xtrap && !xfault));
  assign do_rd  = do_acc && is_rd;
  assign do_wr  = do_acc && is_wr;
  assign fault  = ctrl_fault || (act && (is_own || is_xctx) && !reg_ok)
                             || (act && is_xctx && reg_ok && xfault);

  logic [PREG_W-1:0]   preg, new_preg;
  logic [SVT_XLEN-1:0] prf_rdata, pc_rd;

  svt_rename_map #(.NUM_CTX(NUM_CTX), .NUM_ARCH(NUM_ARCH), .NUM_PHYS(NUM_PHYS)) u_map (
    .clk, .rst_n,
    .ctx      (tgt),
    .areg     (op.reg_idx[AREG_W-1:0]),
    .preg     (preg),
    .alloc    (do_wr && !is_pc),
    .new_preg (new_preg)
  );

  svt_prf #(.NUM_PHYS(NUM_PHYS)) u_prf (
    .clk,
    .we    (do_wr && !is_pc),
    .waddr (new_preg),
    .wdata (op.data),
    .raddr (preg),
    .rdata (prf_rdata)
  );

  svt_fetch_sel #(.NUM_CTX(NUM_CTX), .FETCH_BYTES(FETCH_BYTES)) u_fetch (
    .clk, .rst_n,
    .cur         (cur_ctx),
    .hold        (sw_valid),
    .fetch_ready,
    .fetch_valid,
    .fetch_pc,
    .sw_valid, .sw_from, .sw_pc,
    .pcw_valid   (do_wr && is_pc),
    .pcw_ctx     (tgt),
    .pcw_data    (op.data),
    .pc_rd_ctx   (tgt),
    .pc_rd       (pc_rd)
  );

  logic                rd_pc_q;
  logic [SVT_XLEN-1:0] pc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_pc_q  <= 1'b0;
      pc_q     <= '0;
    end else begin
      rd_valid <= do_rd;
      rd_pc_q  <= is_pc;
      pc_q     <= pc_rd;
    end
  end

  assign rd_data = rd_pc_q ? pc_q : prf_rdata;

  // A switch never coincides with a register access of the stopped context
  // to the wrong map, and the running context is always a real one.
  a_one_hot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(ctx_active));
  a_no_fetch_on_switch: assert property (@(posedge clk) disable iff (!rst_n) flush |-> !fetch_valid);

endmodule
