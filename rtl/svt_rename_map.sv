// svt_rename_map: per-context register alias tables over one shared
// physical register pool.
//
// Each hardware context has its own map from architectural to physical
// register; all contexts draw from one free list, as in an SMT core. Because
// SVT runs one context at a time, one lookup/update port, steered by ctx,
// serves both the running context and cross-context accesses (ctxtld/ctxtst)
// of a hypervisor to a subordinate VM's registers.
//
// A write is renamed (alloc): the head of the free list becomes the new
// mapping and the old physical register goes back to the free list. This
// design has no reorder buffer, so writes are treated as retired when they
// arrive and the old register is freed at once; with one allocation and one
// release per write the free list stays full and is a rotating buffer. Reset
// maps register r of context c to physical register c*NUM_ARCH+r.
//
// Timing: preg and new_preg are combinational; the update happens at the
// clock edge of an alloc.
module svt_rename_map
  import svt_pkg::*;
#(
  parameter int unsigned NUM_CTX  = 3,
  parameter int unsigned NUM_ARCH = 16,
  parameter int unsigned NUM_PHYS = 168,
  localparam int unsigned AREG_W  = $clog2(NUM_ARCH),
  localparam int unsigned PREG_W  = $clog2(NUM_PHYS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ctx_id_t           ctx,
  input  logic [AREG_W-1:0] areg,
  output logic [PREG_W-1:0] preg,
  input  logic              alloc,
  output logic [PREG_W-1:0] new_preg
);

  localparam int unsigned NUM_FREE = NUM_PHYS - NUM_CTX * NUM_ARCH;
  localparam int unsigned CTX_W    = (NUM_CTX > 1) ? $clog2(NUM_CTX) : 1;
  localparam int unsigned FPTR_W   = (NUM_FREE > 1) ? $clog2(NUM_FREE) : 1;

  initial assert (NUM_PHYS > NUM_CTX * NUM_ARCH)
    else $error("NUM_PHYS must exceed NUM_CTX*NUM_ARCH");

  logic [PREG_W-1:0] map  [NUM_CTX][NUM_ARCH];
  logic [PREG_W-1:0] free [NUM_FREE];
  logic [FPTR_W-1:0] fptr;
  logic [CTX_W-1:0]  ci;

  assign ci = ctx[CTX_W-1:0];

  assign preg     = map[ci][areg];
  assign new_preg = free[fptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NUM_CTX; c++)
        for (int r = 0; r < NUM_ARCH; r++)
          map[c][r] <= PREG_W'(c * NUM_ARCH + r);
      for (int f = 0; f < NUM_FREE; f++)
        free[f] <= PREG_W'(NUM_CTX * NUM_ARCH + f);
      fptr <= '0;
    end else if (alloc) begin
      map[ci][areg] <= free[fptr];
      free[fptr]     <= map[ci][areg];
      fptr           <= (32'(fptr) == NUM_FREE - 1) ? '0 : fptr + 1'b1;
    end
  end

  a_ctx_range:  assert property (@(posedge clk) disable iff (!rst_n) 32'(ctx) < NUM_CTX);
  a_areg_range: assert property (@(posedge clk) disable iff (!rst_n) 32'(areg) < NUM_ARCH);

endmodule
