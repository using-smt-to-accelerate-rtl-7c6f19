// tb_svt_rename_map: random reads and renamed writes from all contexts. The
// bench keeps a value per physical register (as the register file would) and
// the expected value of every architectural register of every context; a
// lookup must land on a physical register holding that value. It also checks
// that a write maps the register offered as new_preg, and that after every
// write the mapped registers of all contexts stay distinct (no two contexts
// share an entry). Enough writes are made to cycle the free list many times.
module tb_svt_rename_map;
  import svt_pkg::*;
  localparam int unsigned NUM_CTX = 3, NUM_ARCH = 16, NUM_PHYS = 168;
  localparam int unsigned AREG_W = $clog2(NUM_ARCH), PREG_W = $clog2(NUM_PHYS);

  logic              clk = 0, rst_n = 0;
  ctx_id_t           ctx;
  logic [AREG_W-1:0] areg;
  logic [PREG_W-1:0] preg, new_preg;
  logic              alloc;
  int                pval [NUM_PHYS];
  int                aval [NUM_CTX][NUM_ARCH];
  int checks = 0, failures = 0;

  svt_rename_map dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    ctx = 0; areg = 0; alloc = 0;
    // value of physical register p at reset is p; reset maps c,r -> c*16+r
    for (int p = 0; p < NUM_PHYS; p++) pval[p] = p;
    for (int c = 0; c < NUM_CTX; c++)
      for (int r = 0; r < NUM_ARCH; r++) aval[c][r] = c * NUM_ARCH + r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      ctx   = ctx_id_t'($urandom_range(0, NUM_CTX - 1));
      areg  = AREG_W'($urandom_range(0, NUM_ARCH - 1));
      alloc = $urandom_range(0, 1) == 1;
      #1;
      check(pval[preg] === aval[ctx][areg], $sformatf("lookup ctx%0d r%0d -> p%0d", ctx, areg, preg));
      if (alloc) begin
        automatic logic [PREG_W-1:0] np = new_preg;
        automatic int v = 1000 + n;
        pval[np] = v;
        aval[ctx][areg] = v;
        @(posedge clk); #1;
        check(preg === np, "write maps new_preg");
        alloc = 0;
        // all mapped registers distinct
        begin
          automatic bit seen [NUM_PHYS];
          automatic bit dup = 0;
          for (int p = 0; p < NUM_PHYS; p++) seen[p] = 0;
          for (int c = 0; c < NUM_CTX; c++)
            for (int r = 0; r < NUM_ARCH; r++) begin
              if (seen[dut.map[c][r]]) dup = 1;
              seen[dut.map[c][r]] = 1;
            end
          check(!dup, "mapped registers distinct");
        end
      end
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
