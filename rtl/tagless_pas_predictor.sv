// tagless_pas_predictor: tagless, direct-mapped per-address two-level branch
// predictor with a decoupled branch target buffer.
//
// The direction predictor has two levels. The first, the branch history table
// (bht), is a direct-mapped array of BHT_ENTRIES history shift registers with
// no tags, indexed by low branch-address bits. The history read from it,
// HIST_BITS wide, selects a row of the second-level table (pht) and ADDR_BITS
// low branch-address bits select a column; the two-bit counter found there
// gives the prediction. With no tags, a new branch that maps to an entry
// already used by another simply keeps shifting into the old history
// ("no-flush"), which removes the tag array, its comparators and the
// associative lookup from the critical path. The target buffer (btb) is sized
// on its own and records only taken branches.
//
// Storage cost of the direction predictor, in bits:
//   BHT_ENTRIES * HIST_BITS + 2**(HIST_BITS + ADDR_BITS + 1)
// The defaults (8K entries, 11 history bits, 4 address bits) are the best
// configuration reported for the SPEC CINT95 integer programs at the largest
// budget studied, nominally 16 KB (this formula gives 19 KB for it).
//
// Interface and timing:
//   ready_o               high once the start-up clearing of the tables is
//                         done, max(BHT_ENTRIES, 2**(HIST_BITS+ADDR_BITS))
//                         cycles after reset; lookups and updates before
//                         that are ignored
//   lookup_valid_i, lookup_pc_i
//                         address of a conditional branch to predict (branches
//                         are recognised by predecode bits outside this block)
//   pred_o                the prediction, one cycle after the lookup: the BHT
//                         is read combinationally in the lookup cycle, the
//                         counter and the BTB entry are registered
//   upd_i                 a resolved conditional branch: in that cycle its
//                         counter, selected by the history before this outcome,
//                         is trained, the outcome is shifted into its history
//                         register and, if taken, its target is written to
//                         the BTB
// Tables are updated only at resolution, not speculatively. A lookup in the
// same cycle as an update sees the tables as they were before the update.
// The two-level organisation, the tagless direct-mapped tables, the no-flush
// policy, the cost formula and the default sizes follow the predictor's
// description; the index bits, timing, update policy, start-up clearing and
// BTB_ENTRIES are this design's choices. ADDR_BITS = 0 gives the PAg form,
// with one column of counters indexed by history alone.
module tagless_pas_predictor
  import bp_pkg::*;
#(
  parameter int unsigned BHT_ENTRIES = 8192,
  parameter int unsigned HIST_BITS   = 11,
  parameter int unsigned ADDR_BITS   = 4,
  parameter int unsigned BTB_ENTRIES = 1024,
  localparam int unsigned BHT_IDX_W = (BHT_ENTRIES > 1) ? $clog2(BHT_ENTRIES) : 1,
  localparam int unsigned BTB_IDX_W = (BTB_ENTRIES > 1) ? $clog2(BTB_ENTRIES) : 1,
  localparam int unsigned PHT_AW    = (ADDR_BITS > 0) ? ADDR_BITS : 1
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  output logic        ready_o,
  input  logic        lookup_valid_i,
  input  pc_t         lookup_pc_i,
  output bp_predict_t pred_o,
  input  bp_update_t  upd_i
);

  logic                 bht_done, pht_done;
  logic                 lookup_en, upd_en;
  logic [HIST_BITS-1:0] lookup_hist, upd_hist;
  ctr_t                 pred_ctr;
  logic                 pred_valid_q;
  logic                 btb_hit;
  pc_t                  btb_target;

  assign ready_o   = bht_done && pht_done;
  assign lookup_en = lookup_valid_i && ready_o;
  assign upd_en    = upd_i.valid && ready_o;

  bht #(
    .ENTRIES   (BHT_ENTRIES),
    .HIST_BITS (HIST_BITS)
  ) u_bht (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .init_done_o (bht_done),
    .rd_idx_i    (lookup_pc_i[ALIGN_BITS +: BHT_IDX_W]),
    .rd_hist_o   (lookup_hist),
    .upd_en_i    (upd_en),
    .upd_idx_i   (upd_i.pc[ALIGN_BITS +: BHT_IDX_W]),
    .upd_taken_i (upd_i.taken),
    .upd_hist_o  (upd_hist)
  );

  pht #(
    .HIST_BITS (HIST_BITS),
    .ADDR_BITS (ADDR_BITS)
  ) u_pht (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .init_done_o (pht_done),
    .rd_en_i     (lookup_en),
    .rd_hist_i   (lookup_hist),
    .rd_addr_i   (lookup_pc_i[ALIGN_BITS +: PHT_AW]),
    .rd_ctr_o    (pred_ctr),
    .upd_en_i    (upd_en),
    .upd_hist_i  (upd_hist),
    .upd_addr_i  (upd_i.pc[ALIGN_BITS +: PHT_AW]),
    .upd_taken_i (upd_i.taken)
  );

  btb #(
    .ENTRIES (BTB_ENTRIES)
  ) u_btb (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .rd_en_i     (lookup_en),
    .rd_idx_i    (lookup_pc_i[ALIGN_BITS +: BTB_IDX_W]),
    .rd_valid_o  (btb_hit),
    .rd_target_o (btb_target),
    .wr_en_i     (upd_en && upd_i.taken),
    .wr_idx_i    (upd_i.pc[ALIGN_BITS +: BTB_IDX_W]),
    .wr_target_i (upd_i.target)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) pred_valid_q <= 1'b0;
    else         pred_valid_q <= lookup_en;
  end

  always_comb begin
    pred_o.valid        = pred_valid_q;
    pred_o.taken        = pred_ctr[1];
    pred_o.target_valid = btb_hit;
    pred_o.target       = btb_target;
  end

  // Once the tables are cleared the predictor stays ready until the next reset.
  logic ready_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ready_q <= 1'b0;
    end else begin
      ready_q <= ready_o;
      a_ready_stays: assert (!ready_q || ready_o)
        else $error("ready_o fell without a reset");
    end
  end

endmodule
