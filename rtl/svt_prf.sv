// svt_prf: physical register file shared by all hardware contexts.
//
// The SMT core's one physical register file; which entry belongs to which
// context is decided only by the per-context rename maps. SVT needs no extra
// ports for cross-context accesses because one context runs at a time, so the
// file has one write and one read port. The read is synchronous (data one
// cycle after raddr); a read of the entry being written in the same cycle
// returns the new data. Contents are not reset. Port count, read timing and
// the bypass are this design's choices.
module svt_prf #(
  parameter int unsigned NUM_PHYS = 168,
  parameter int unsigned WIDTH    = svt_pkg::SVT_XLEN,
  localparam int unsigned PREG_W  = $clog2(NUM_PHYS)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [PREG_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic [PREG_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [NUM_PHYS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= (we && waddr == raddr) ? wdata : mem[raddr];
  end

endmodule
