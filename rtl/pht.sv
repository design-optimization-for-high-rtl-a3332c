// pht: second-level table of two-bit saturating counters.
//
// The table is a 2**HIST_BITS by 2**ADDR_BITS array: the history read from the
// first-level table selects the row and ADDR_BITS low branch-address bits
// select the column. It is stored as one flat memory addressed by
// {history, address bits}. Each entry is a two-bit up/down saturating counter
// (sat_counter2); its upper bit is the prediction.
//
// Interface and timing:
//   rd_en_i, rd_hist_i, rd_addr_i -> rd_ctr_o
//                         synchronous read: the counter appears after the
//                         next rising edge and holds until the next read
//   upd_en_i, upd_hist_i, upd_addr_i, upd_taken_i
//                         read-modify-write of one counter, written at the
//                         next rising edge
//   init_done_o           low for 2**(HIST_BITS+ADDR_BITS) cycles after reset
//                         while every counter is set to CTR_INIT; updates are
//                         ignored until then
// A read of the counter being updated in the same cycle returns the old value.
// The row/column organisation and the counters follow the predictor's
// definition; the flat layout, read timing, start-up clearing and CTR_INIT are
// this design's choices. ADDR_BITS may be 0, which gives a single column
// (the PAg organisation); the address ports are then one bit wide and unused.
module pht
  import bp_pkg::*;
#(
  parameter int unsigned HIST_BITS = 11,
  parameter int unsigned ADDR_BITS = 4,
  parameter ctr_t        CTR_INIT  = CTR_WEAK_NT,
  localparam int unsigned IDX_W = HIST_BITS + ADDR_BITS,
  localparam int unsigned DEPTH = 1 << IDX_W,
  localparam int unsigned AW    = (ADDR_BITS > 0) ? ADDR_BITS : 1
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  output logic                 init_done_o,
  input  logic                 rd_en_i,
  input  logic [HIST_BITS-1:0] rd_hist_i,
  input  logic [AW-1:0]        rd_addr_i,
  output ctr_t                 rd_ctr_o,
  input  logic                 upd_en_i,
  input  logic [HIST_BITS-1:0] upd_hist_i,
  input  logic [AW-1:0]        upd_addr_i,
  input  logic                 upd_taken_i
);

  ctr_t mem [DEPTH];

  logic             init_busy;
  logic [IDX_W-1:0] init_idx;
  logic [IDX_W-1:0] rd_idx, upd_idx;
  ctr_t             upd_old, upd_new;
  logic             upd_pred_unused;

  if (ADDR_BITS > 0) begin : g_pas
    assign rd_idx  = {rd_hist_i, rd_addr_i};
    assign upd_idx = {upd_hist_i, upd_addr_i};
  end else begin : g_pag
    logic addr_unused;
    assign rd_idx      = rd_hist_i;
    assign upd_idx     = upd_hist_i;
    assign addr_unused = rd_addr_i[0] ^ upd_addr_i[0];
  end
  assign upd_old = mem[upd_idx];

  sat_counter2 u_ctr (
    .ctr_i     (upd_old),
    .taken_i   (upd_taken_i),
    .ctr_o     (upd_new),
    .predict_o (upd_pred_unused)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      init_busy <= 1'b1;
      init_idx  <= '0;
    end else if (init_busy) begin
      if (init_idx == IDX_W'(DEPTH - 1)) init_busy <= 1'b0;
      init_idx <= init_idx + 1'b1;
    end
  end

  always_ff @(posedge clk_i) begin
    if (init_busy)     mem[init_idx] <= CTR_INIT;
    else if (upd_en_i) mem[upd_idx]  <= upd_new;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)      rd_ctr_o <= CTR_INIT;
    else if (rd_en_i) rd_ctr_o <= mem[rd_idx];
  end

  assign init_done_o = !init_busy;

endmodule
