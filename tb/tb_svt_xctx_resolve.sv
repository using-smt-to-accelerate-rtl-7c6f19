// tb_svt_xctx_resolve: exhaustive check of the ctxtld/ctxtst level rules.
// Every combination of is_vm, lvl and the valid bits of SVt_vm/SVt_nested is
// applied with random context ids, register indexes and trap masks, and
// compared with a table of the expected target, trap and fault written out
// case by case.
module tb_svt_xctx_resolve;
  import svt_pkg::*;

  logic                 is_vm;
  logic [1:0]           lvl;
  logic [REG_IDX_W-1:0] reg_idx;
  svt_ctx_t             vm, nested;
  logic [31:0]          trap_mask;
  ctx_id_t              tgt;
  logic                 trap, fault;
  int checks = 0, failures = 0;

  svt_xctx_resolve dut (.*);

  task automatic expect_out(string what, logic e_trap, logic e_fault, ctx_id_t e_tgt, logic chk_tgt);
    checks++;
    if (trap !== e_trap || fault !== e_fault || (chk_tgt && tgt !== e_tgt)) begin
      failures++;
      $display("FAIL %s is_vm=%0d lvl=%0d vm=%p nested=%p: tgt=%0d trap=%0d fault=%0d (exp %0d %0d %0d)",
               what, is_vm, lvl, vm, nested, tgt, trap, fault, e_tgt, e_trap, e_fault);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 200; rep++) begin
      for (int v = 0; v < 2; v++)
      for (int l = 0; l < 4; l++)
      for (int vv = 0; vv < 2; vv++)
      for (int nv = 0; nv < 2; nv++) begin
        is_vm     = v[0];
        lvl       = l[1:0];
        vm        = '{valid: vv[0], id: ctx_id_t'($urandom)};
        nested    = '{valid: nv[0], id: ctx_id_t'($urandom)};
        reg_idx   = REG_IDX_W'($urandom);
        trap_mask = (rep % 3 == 0) ? $urandom : 32'h0;
        #1;
        if (!is_vm) begin
          // host hypervisor: lvl1 -> SVt_vm, lvl2 -> SVt_nested, never traps
          if (l == 1 && vv == 1)      expect_out("host lvl1", 0, 0, vm.id, 1);
          else if (l == 2 && nv == 1) expect_out("host lvl2", 0, 0, nested.id, 1);
          else                        expect_out("host illegal", 0, 1, '0, 0);
        end else begin
          // guest hypervisor: only lvl1 -> SVt_nested, mask may force a trap
          if (l == 1 && nv == 1) expect_out("guest lvl1", trap_mask[reg_idx], 0, nested.id, 1);
          else                   expect_out("guest illegal", 1, 0, '0, 0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
