// svt_xctx_resolve: target context of a cross-context register access.
//
// ctxtld/ctxtst name their target indirectly with a level argument, so that
// hardware context ids stay virtualized. Following the SVT rules:
//   host hypervisor  (is_vm == 0): lvl 1 -> SVt_vm, lvl 2 -> SVt_nested
//   guest hypervisor (is_vm == 1): lvl 1 -> SVt_nested
// Any other combination is refused. In a guest hypervisor a refused access is
// a VM trap (trap), so the hypervisor above can emulate deeper hierarchies;
// in the host hypervisor, which has nothing above it, it is an exception
// (fault). Treating a selected field that holds the invalid value the same
// way, and the per-register trap mask (one bit per register index, only
// applied in a guest hypervisor so the host can intercept chosen registers)
// are this design's reading of the rules.
//
// Purely combinational; no clock.
module svt_xctx_resolve
  import svt_pkg::*;
(
  input  logic                 is_vm,
  input  logic [1:0]           lvl,
  input  logic [REG_IDX_W-1:0] reg_idx,
  input  svt_ctx_t             vm,
  input  svt_ctx_t             nested,
  input  logic [31:0]          trap_mask,
  output ctx_id_t              tgt,
  output logic                 trap,
  output logic                 fault
);

  svt_ctx_t sel;
  logic     legal;

  always_comb begin
    sel   = CTX_INVALID;
    legal = 1'b0;
    if (!is_vm) begin
      if (lvl == 2'd1) begin
        sel = vm;     legal = 1'b1;
      end else if (lvl == 2'd2) begin
        sel = nested; legal = 1'b1;
      end
    end else if (lvl == 2'd1) begin
      sel = nested;   legal = 1'b1;
    end

    tgt   = sel.id;
    trap  = 1'b0;
    fault = 1'b0;
    if (!legal || !sel.valid) begin
      trap  = is_vm;
      fault = !is_vm;
    end else if (is_vm && trap_mask[reg_idx]) begin
      trap  = 1'b1;
    end
  end

endmodule
