// svt_ctx_ctrl: SVT context-switch controller and per-core micro-registers.
//
// Holds SVt_current (the context instruction fetch and execution use), is_vm
// (running inside a VM) and the cached copies of the three VMCS fields
// SVt_visor, SVt_vm and SVt_nested. Per operation of the active context:
//   VMPTRLD  in the host hypervisor: copy the three fields (and the register
//            trap mask) into the micro-registers; in a VM: VM trap.
//   VMRESUME in the host hypervisor: SVt_current <= SVt_vm, is_vm <= 1;
//            in a VM: VM trap (the guest hypervisor's resume goes through L0).
//   VMTRAP   (trapping instruction) in a VM: VM trap.
//   ctxtld/ctxtst refused by svt_xctx_resolve in a VM: VM trap.
// A VM trap sets SVt_current <= SVt_visor and is_vm <= 0. An external
// interrupt while is_vm is set is an asynchronous VM trap. These rules are the
// SVT architecture's. This design's own choices: reset to context 0 with all
// fields invalid; a field id at or above NUM_CTX is stored as invalid; a VM
// resume with an invalid SVt_vm raises fault instead of switching; a trap with
// an invalid SVt_visor goes to context 0; a switching operation wins over an
// interrupt in the same cycle (the interrupt is a level and is taken next).
//
// Timing: sw_valid, exit_* and fault are combinational in the cycle of the
// operation; SVt_current and is_vm change at the following clock edge.
// sw_from/sw_pc tell the fetch unit which context stopped and where it must
// restart: the trapping instruction's PC for a trap (the hypervisor advances
// it after emulation), the next PC for a VM resume.
module svt_ctx_ctrl
  import svt_pkg::*;
#(
  parameter int unsigned NUM_CTX = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ev_valid,
  input  svt_op_t             ev,
  input  logic                xctx_trap,
  input  logic                irq,
  input  logic [SVT_XLEN-1:0] irq_pc,
  output ctx_id_t             cur,
  output logic                is_vm,
  output svt_ctx_t            visor,
  output svt_ctx_t            vm,
  output svt_ctx_t            nested,
  output logic [31:0]         trap_mask,
  output logic                sw_valid,
  output ctx_id_t             sw_from,
  output ctx_id_t             sw_to,
  output logic [SVT_XLEN-1:0] sw_pc,
  output logic                exit_valid,
  output svt_exit_e           exit_reason,
  output logic                fault
);

  initial assert (NUM_CTX >= 2 && NUM_CTX <= 2**CTX_ID_W)
    else $error("NUM_CTX out of range");

  function automatic svt_ctx_t sanitize(svt_ctx_t f);
    svt_ctx_t r = f;
    if (32'(f.id) >= NUM_CTX) r.valid = 1'b0;
    if (!r.valid) r.id = '0;
    return r;
  endfunction

  logic load;

  always_comb begin
    load        = 1'b0;
    exit_reason = EXIT_NONE;
    fault       = 1'b0;
    sw_valid    = 1'b0;
    sw_to       = cur;
    sw_pc       = ev.pc;
    if (ev_valid) begin
      unique case (ev.kind)
        OP_VMPTRLD:  if (is_vm) exit_reason = EXIT_VMPTRLD; else load = 1'b1;
        OP_VMRESUME: if (is_vm) exit_reason = EXIT_VMRESUME;
                     else if (vm.valid) begin
                       sw_valid = 1'b1;
                       sw_to    = vm.id;
                     end else fault = 1'b1;
        OP_VMTRAP:   if (is_vm) exit_reason = EXIT_INSN;
        OP_CTXTLD, OP_CTXTST: if (xctx_trap) exit_reason = EXIT_XCTX;
        default: ;
      endcase
    end
    if (exit_reason == EXIT_NONE && !sw_valid && irq && is_vm) begin
      exit_reason = EXIT_IRQ;
      sw_pc       = irq_pc;
    end
    exit_valid = (exit_reason != EXIT_NONE);
    if (exit_valid) begin
      sw_valid = 1'b1;
      sw_to    = visor.valid ? visor.id : '0;
    end
  end

  assign sw_from = cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur       <= '0;
      is_vm     <= 1'b0;
      visor     <= CTX_INVALID;
      vm        <= CTX_INVALID;
      nested    <= CTX_INVALID;
      trap_mask <= '0;
    end else begin
      if (load) begin
        visor     <= sanitize(ev.f_visor);
        vm        <= sanitize(ev.f_vm);
        nested    <= sanitize(ev.f_nested);
        trap_mask <= ev.trap_mask;
      end
      if (sw_valid) begin
        cur   <= sw_to;
        is_vm <= !exit_valid;
      end
    end
  end

  // Only the host hypervisor may load the fields or enter a VM directly.
  a_load_host: assert property (@(posedge clk) disable iff (!rst_n) load |-> !is_vm);
  a_cur_range: assert property (@(posedge clk) disable iff (!rst_n) 32'(cur) < NUM_CTX);

endmodule
