// svt_pkg: types and constants shared by the SVT (SMT-based virtualization)
// blocks.
//
// SVT runs each virtualization level (host hypervisor L0, guest hypervisor L1,
// nested VM L2, ...) in its own hardware context of an SMT core and turns VM
// trap / VM resume into "stop fetching from one context, start fetching from
// another". The per-core state is three cached context fields (SVt_visor,
// SVt_vm, SVt_nested), the active context SVt_current and is_vm.
//
// A context field is a valid bit plus a context id; the encoding (4-bit id,
// separate valid bit) is this design's choice. Register index 31 names the
// instruction pointer of a context, indexes below the architectural register
// count name general-purpose registers; that index map is also this design's
// choice. Registers are 64 bits wide, as on x86-64.
package svt_pkg;

  localparam int unsigned SVT_XLEN    = 64;
  localparam int unsigned CTX_ID_W    = 4;   // up to 16 hardware contexts
  localparam int unsigned REG_IDX_W   = 5;
  localparam logic [REG_IDX_W-1:0] REG_PC = 5'd31;

  typedef logic [CTX_ID_W-1:0] ctx_id_t;

  // A VMCS context field as cached in the core.
  typedef struct packed {
    logic    valid;
    ctx_id_t id;
  } svt_ctx_t;

  localparam svt_ctx_t CTX_INVALID = '{valid: 1'b0, id: '0};

  // Operations the pipeline presents to the SVT logic, one per cycle, in
  // program order, tagged with the context that issued them.
  typedef enum logic [3:0] {
    OP_NONE     = 4'd0,
    OP_RD       = 4'd1,  // read own register (data returned next cycle)
    OP_WR       = 4'd2,  // write own register (index 31: jump)
    OP_CTXTLD   = 4'd3,  // read register of a subordinate context (lvl)
    OP_CTXTST   = 4'd4,  // write register of a subordinate context (lvl)
    OP_VMPTRLD  = 4'd5,  // load a VMCS: carries its three SVT fields
    OP_VMRESUME = 4'd6,  // VM resume (VM entry)
    OP_VMTRAP   = 4'd7   // an instruction that traps when run in a VM (cpuid, I/O, ...)
  } svt_op_e;

  typedef struct packed {
    svt_op_e                 kind;
    ctx_id_t                 ctx;        // issuing hardware context
    logic [1:0]              lvl;        // ctxtld/ctxtst level argument
    logic [REG_IDX_W-1:0]    reg_idx;
    logic [SVT_XLEN-1:0]     data;       // write data
    logic [SVT_XLEN-1:0]     pc;         // own PC (traps) or next PC (VM resume)
    svt_ctx_t                f_visor;    // VMPTRLD: SVt_visor field
    svt_ctx_t                f_vm;       // VMPTRLD: SVt_vm field
    svt_ctx_t                f_nested;   // VMPTRLD: SVt_nested field
    logic [31:0]             trap_mask;  // VMPTRLD: per-register cross-context trap bits
  } svt_op_t;

  typedef enum logic [2:0] {
    EXIT_NONE     = 3'd0,
    EXIT_INSN     = 3'd1,  // trapping instruction in a VM
    EXIT_VMPTRLD  = 3'd2,  // VMCS load by a guest hypervisor
    EXIT_VMRESUME = 3'd3,  // VM resume by a guest hypervisor
    EXIT_XCTX     = 3'd4,  // cross-context access the hypervisor must see
    EXIT_IRQ      = 3'd5   // asynchronous: external interrupt
  } svt_exit_e;

endpackage
