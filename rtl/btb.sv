// btb: decoupled, direct-mapped branch target buffer.
//
// Because the direction predictor keeps no tags, the BTB is no longer tied to
// it: it has its own number of entries and records only branches that were
// taken, as a not-taken branch needs no target. Each entry holds a target
// address and, as the predictor's tables do, no tag; a valid bit tells an
// entry that has been written since reset from one that has not. Targets are
// stored without their ALIGN_BITS always-zero low bits.
//
// Interface and timing:
//   rd_en_i, rd_idx_i -> rd_valid_o, rd_target_o
//                      synchronous read, result after the next rising edge
//                      and held until the next read
//   wr_en_i, wr_idx_i, wr_target_i
//                      write a taken branch's target at the next rising edge
// A read of the entry being written in the same cycle returns the old entry.
// Recording only taken branches and sizing the BTB apart from the history
// table follow the decoupled organisation; ENTRIES, the valid bits and the
// tagless entries are this design's choices.
module btb
  import bp_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024,
  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned TGT_W = PC_W - ALIGN_BITS
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             rd_en_i,
  input  logic [IDX_W-1:0] rd_idx_i,
  output logic             rd_valid_o,
  output pc_t              rd_target_o,
  input  logic             wr_en_i,
  input  logic [IDX_W-1:0] wr_idx_i,
  input  pc_t              wr_target_i
);

  logic [TGT_W-1:0] tgt_mem [ENTRIES];
  logic [ENTRIES-1:0] valid_q;
  logic [TGT_W-1:0] rd_tgt_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)      valid_q <= '0;
    else if (wr_en_i) valid_q[wr_idx_i] <= 1'b1;
  end

  always_ff @(posedge clk_i) begin
    if (wr_en_i) tgt_mem[wr_idx_i] <= wr_target_i[PC_W-1:ALIGN_BITS];
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_valid_o <= 1'b0;
      rd_tgt_q   <= '0;
    end else if (rd_en_i) begin
      rd_valid_o <= valid_q[rd_idx_i];
      rd_tgt_q   <= tgt_mem[rd_idx_i];
    end
  end

  assign rd_target_o = {rd_tgt_q, {ALIGN_BITS{1'b0}}};

endmodule
