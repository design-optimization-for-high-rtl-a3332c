// bht: first-level branch history table of a tagless per-address predictor.
//
// ENTRIES history shift registers of HIST_BITS each, direct-mapped and without
// tags: the caller picks an entry with low branch-address bits, and every
// branch that maps to an entry shares it. Because there are no tags a conflict
// cannot be detected, so an entry is never flushed: a resolved outcome is
// always shifted into the entry as it is ("no-flush" policy). The new outcome
// enters at the most significant bit and the oldest outcome drops out of the
// least significant bit (1 = taken).
//
// Interface and timing:
//   rd_idx_i -> rd_hist_o      combinational read for the prediction path
//   upd_en_i, upd_idx_i, upd_taken_i
//                              shift the outcome into entry upd_idx_i at the
//                              next rising clock edge
//   upd_hist_o                 combinational: the entry's history before the
//                              shift, which indexes the counter to train
//   init_done_o                low for ENTRIES cycles after reset while every
//                              entry is written with HIST_INIT; updates are
//                              ignored until then
// A read of the entry being updated in the same cycle returns the old history.
// The table organisation, the no-flush policy and the shift direction follow
// the predictor's definition; the start-up clearing sequence, HIST_INIT and
// the read/write timing are this design's choices.
module bht #(
  parameter int unsigned ENTRIES   = 8192,
  parameter int unsigned HIST_BITS = 11,
  parameter logic [HIST_BITS-1:0] HIST_INIT = '0,
  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  output logic                 init_done_o,
  input  logic [IDX_W-1:0]     rd_idx_i,
  output logic [HIST_BITS-1:0] rd_hist_o,
  input  logic                 upd_en_i,
  input  logic [IDX_W-1:0]     upd_idx_i,
  input  logic                 upd_taken_i,
  output logic [HIST_BITS-1:0] upd_hist_o
);

  logic [HIST_BITS-1:0] mem [ENTRIES];

  logic                 init_busy;
  logic [IDX_W-1:0]     init_idx;
  logic [HIST_BITS-1:0] shifted;

  assign rd_hist_o  = mem[rd_idx_i];
  assign upd_hist_o = mem[upd_idx_i];

  // Newest outcome at the msb, oldest one shifted out at the lsb.
  if (HIST_BITS > 1) begin : g_shift
    assign shifted = {upd_taken_i, upd_hist_o[HIST_BITS-1:1]};
  end else begin : g_single
    assign shifted = upd_taken_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      init_busy <= 1'b1;
      init_idx  <= '0;
    end else if (init_busy) begin
      if (init_idx == IDX_W'(ENTRIES - 1)) init_busy <= 1'b0;
      init_idx <= init_idx + 1'b1;
    end
  end

  always_ff @(posedge clk_i) begin
    if (init_busy)     mem[init_idx]  <= HIST_INIT;
    else if (upd_en_i) mem[upd_idx_i] <= shifted;
  end

  assign init_done_o = !init_busy;

endmodule
