// tb_svt_fetch_sel: random fetch handshakes, context changes, switches and
// PC writes against a per-context PC model. Checks that only the active
// context fetches, that fetch advances by FETCH_BYTES per accepted block,
// that a stalled context keeps its PC, that no fetch is issued in a switch
// cycle and that the stopped context restarts at the given PC.
module tb_svt_fetch_sel;
  import svt_pkg::*;
  localparam int unsigned NUM_CTX = 3, FETCH_BYTES = 16;

  logic          clk = 0, rst_n = 0;
  ctx_id_t       cur, sw_from, pcw_ctx, pc_rd_ctx;
  logic          hold, fetch_ready, fetch_valid, sw_valid, pcw_valid;
  logic [63:0]   fetch_pc, sw_pc, pcw_data, pc_rd;
  logic [63:0]   model [NUM_CTX];
  int checks = 0, failures = 0;

  svt_fetch_sel dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    cur = 0; hold = 0; fetch_ready = 0; sw_valid = 0; sw_from = 0; sw_pc = 0;
    pcw_valid = 0; pcw_ctx = 0; pcw_data = 0; pc_rd_ctx = 0;
    for (int i = 0; i < NUM_CTX; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      cur         = ctx_id_t'($urandom_range(0, NUM_CTX - 1));
      fetch_ready = $urandom_range(0, 3) != 0;
      sw_valid    = $urandom_range(0, 7) == 0;
      hold        = sw_valid;
      sw_from     = cur;
      sw_pc       = {$urandom, $urandom};
      pcw_valid   = $urandom_range(0, 7) == 0;
      pcw_ctx     = ctx_id_t'($urandom_range(0, NUM_CTX - 1));
      pcw_data    = {$urandom, $urandom};
      pc_rd_ctx   = ctx_id_t'($urandom_range(0, NUM_CTX - 1));
      #1;
      check(fetch_valid === !hold, "fetch_valid only outside switch cycles");
      check(fetch_pc === model[cur], $sformatf("fetch_pc ctx%0d %h exp %h", cur, fetch_pc, model[cur]));
      check(pc_rd === model[pc_rd_ctx], "pc read port");
      if (fetch_valid && fetch_ready) model[cur] = model[cur] + FETCH_BYTES;
      if (pcw_valid) model[pcw_ctx] = pcw_data;
      if (sw_valid) model[sw_from] = sw_pc;
    end
    @(negedge clk);
    for (int i = 0; i < NUM_CTX; i++) begin
      pc_rd_ctx = ctx_id_t'(i); #1;
      check(pc_rd === model[i], "final pc");
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
