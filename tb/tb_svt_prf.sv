// tb_svt_prf: random writes and reads of the shared physical register file
// against a shadow array, including same-cycle read-after-write (the read
// must return the new value) and the one-cycle read latency.
module tb_svt_prf;
  localparam int unsigned NUM_PHYS = 168;
  localparam int unsigned PREG_W   = $clog2(NUM_PHYS);

  logic              clk = 0;
  logic              we;
  logic [PREG_W-1:0] waddr, raddr;
  logic [63:0]       wdata, rdata;
  logic [63:0]       shadow [NUM_PHYS];
  logic [63:0]       exp_q;
  logic              exp_v;
  int checks = 0, failures = 0;

  svt_prf dut (.*);

  always #5 clk = ~clk;

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0; exp_v = 0;
    // fill every entry first so every read has a known value
    for (int i = 0; i < NUM_PHYS; i++) begin
      @(negedge clk);
      we = 1; waddr = PREG_W'(i); wdata = {$urandom, $urandom};
      shadow[i] = wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata !== exp_q) begin
          failures++;
          $display("FAIL read: got %h exp %h", rdata, exp_q);
        end
      end
      we    = $urandom_range(0, 1) == 1;
      waddr = PREG_W'($urandom_range(0, NUM_PHYS - 1));
      wdata = {$urandom, $urandom};
      raddr = ($urandom_range(0, 3) == 0) ? waddr : PREG_W'($urandom_range(0, NUM_PHYS - 1));
      exp_q = (we && waddr == raddr) ? wdata : shadow[raddr];
      exp_v = 1;
      if (we) shadow[waddr] = wdata;
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
