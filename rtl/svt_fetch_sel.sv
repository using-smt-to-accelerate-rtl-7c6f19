// svt_fetch_sel: per-context instruction pointers and fetch selection.
//
// Every hardware context keeps its own PC, as SMT threads do. Only the
// context in SVt_current (cur) fetches; the others are stalled but keep
// their state, which is what makes an SVT context switch cheap. In the cycle
// of a switch (hold) no fetch is issued, the pipeline is squashed, and the
// stopped context's PC is set to the restart PC (sw_pc); fetch resumes from
// the new context's PC in the next cycle. A PC write (pcw_*) moves any
// context's PC: a jump of the running context, or a hypervisor advancing a
// VM's instruction pointer with ctxtst. Sequential fetch in FETCH_BYTES
// blocks, reset PCs of 0 and the priority switch > PC write > fetch advance
// are this design's choices.
//
// Interface: fetch_valid/fetch_ready handshake; fetch_pc is the PC of
// context cur, valid with fetch_valid. pc_rd is a combinational read of the
// PC of context pc_rd_ctx.
module svt_fetch_sel
  import svt_pkg::*;
#(
  parameter int unsigned NUM_CTX     = 3,
  parameter int unsigned FETCH_BYTES = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  ctx_id_t             cur,
  input  logic                hold,
  input  logic                fetch_ready,
  output logic                fetch_valid,
  output logic [SVT_XLEN-1:0] fetch_pc,
  input  logic                sw_valid,
  input  ctx_id_t             sw_from,
  input  logic [SVT_XLEN-1:0] sw_pc,
  input  logic                pcw_valid,
  input  ctx_id_t             pcw_ctx,
  input  logic [SVT_XLEN-1:0] pcw_data,
  input  ctx_id_t             pc_rd_ctx,
  output logic [SVT_XLEN-1:0] pc_rd
);

  localparam int unsigned CTX_W = (NUM_CTX > 1) ? $clog2(NUM_CTX) : 1;

  logic [SVT_XLEN-1:0] pc [NUM_CTX];
  logic [CTX_W-1:0]    ci, ri, wi, si;

  assign ci = cur[CTX_W-1:0];
  assign ri = pc_rd_ctx[CTX_W-1:0];
  assign wi = pcw_ctx[CTX_W-1:0];
  assign si = sw_from[CTX_W-1:0];

  assign fetch_valid = !hold;
  assign fetch_pc    = pc[ci];
  assign pc_rd       = pc[ri];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CTX; i++) pc[i] <= '0;
    end else begin
      if (fetch_valid && fetch_ready) pc[ci] <= pc[ci] + SVT_XLEN'(FETCH_BYTES);
      if (pcw_valid) pc[wi] <= pcw_data;
      if (sw_valid)  pc[si] <= sw_pc;
    end
  end

  a_cur_range: assert property (@(posedge clk) disable iff (!rst_n) 32'(cur) < NUM_CTX);

endmodule
