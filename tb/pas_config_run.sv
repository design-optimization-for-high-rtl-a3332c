// pas_config_run: test harness for one predictor configuration.
//
// Instantiates tagless_pas_predictor with the given sizes, resets it, waits
// for the start-up clearing (which must take as many cycles as the larger
// of the two direction tables has entries) and then runs a synthetic branch stream: every cycle one of
// NSTATIC static branches is looked up and the branch looked up in the
// previous cycle is resolved, as a short pipeline would. The branches follow
// loop, always-taken, never-taken, alternating and random patterns, and
// their addresses are spread so that small tables share entries. A reference
// model kept here predicts every lookup on its own; each prediction is
// compared with it. The harness also counts mispredictions against the real
// outcomes, reported as a rate. done_o rises when NOPS branches have run.
module pas_config_run
  import bp_pkg::*;
#(
  parameter int unsigned BHT_N   = 128,
  parameter int unsigned HB      = 8,
  parameter int unsigned AB      = 0,
  parameter int unsigned NSTATIC = 96,
  parameter int unsigned NOPS    = 20000,
  parameter string       LABEL   = "config"
) (
  input  logic clk,
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);
  localparam int unsigned PHT_N = 1 << (HB + AB);
  localparam int unsigned BTB_N = 1024;
  localparam int unsigned BI_W  = (BHT_N > 1) ? $clog2(BHT_N) : 1;

  logic rst_n = 0, ready;
  logic lookup_valid;
  pc_t  lookup_pc;
  bp_predict_t pred;
  bp_update_t  upd;

  tagless_pas_predictor #(
    .BHT_ENTRIES(BHT_N), .HIST_BITS(HB), .ADDR_BITS(AB), .BTB_ENTRIES(BTB_N)
  ) dut (
    .clk_i(clk), .rst_ni(rst_n), .ready_o(ready),
    .lookup_valid_i(lookup_valid), .lookup_pc_i(lookup_pc),
    .pred_o(pred), .upd_i(upd)
  );

  logic [HB-1:0] m_bht [BHT_N];
  int            m_pht [PHT_N];
  logic          m_bv  [BTB_N];
  pc_t           m_bt  [BTB_N];
  int            iter  [NSTATIC];
  int checks = 0, failures = 0, mispredicts = 0, predicted = 0;

  assign checks_o   = checks;
  assign failures_o = failures;

  function automatic pc_t pc_of(int b);
    return 32'h0040_0000 + 32'(b * 4 * 37);
  endfunction

  function automatic logic outcome(int b, int k);
    unique case (b % 5)
      0: return (k % 4) != 3;
      1: return 1'b1;
      2: return (k % 8) == 0;
      3: return k[0];
      default: return $urandom_range(3) != 0;
    endcase
  endfunction

  function automatic int bidx(pc_t pc);
    return int'(pc[2 +: BI_W]) % BHT_N;
  endfunction
  function automatic int pidx(logic [HB-1:0] h, pc_t pc);
    return (AB == 0) ? int'(h) : int'(h) * (1 << AB) + int'(pc[2 +: ((AB > 0) ? AB : 1)]) % (1 << AB);
  endfunction

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %s at %0t", LABEL, what, $time);
    end
  endtask

  initial begin
    int cycles, cur, prev;
    logic prev_out, cur_out, exp_taken, exp_tv;
    pc_t exp_tgt;
    done_o = 0;
    for (int i = 0; i < BHT_N; i++) m_bht[i] = '0;
    for (int i = 0; i < PHT_N; i++) m_pht[i] = 1;
    for (int i = 0; i < BTB_N; i++) begin m_bv[i] = 0; m_bt[i] = '0; end
    for (int i = 0; i < int'(NSTATIC); i++) iter[i] = 0;
    lookup_valid = 0; lookup_pc = '0; upd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cycles = 0;
    while (!ready) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == ((BHT_N > PHT_N) ? BHT_N : PHT_N), $sformatf("ready after %0d cycles", cycles));
    prev = -1; prev_out = 0;
    for (int n = 0; n < int'(NOPS); n++) begin
      int bi, ti, pi;
      cur = $urandom_range(NSTATIC - 1);
      cur_out = outcome(cur, iter[cur]);
      iter[cur]++;
      lookup_valid = 1; lookup_pc = pc_of(cur);
      upd = '0;
      if (prev >= 0) begin
        upd.valid = 1; upd.pc = pc_of(prev); upd.taken = prev_out;
        upd.target = pc_of(prev) + 32'h200;
      end
      @(posedge clk);
      // expected prediction from the state before this edge
      bi = bidx(lookup_pc); ti = int'(lookup_pc[2 +: 10]);
      exp_taken = m_pht[pidx(m_bht[bi], lookup_pc)] >= 2;
      exp_tv = m_bv[ti]; exp_tgt = m_bt[ti];
      if (upd.valid) begin
        bi = bidx(upd.pc); pi = pidx(m_bht[bi], upd.pc);
        if (upd.taken && m_pht[pi] < 3) m_pht[pi]++;
        if (!upd.taken && m_pht[pi] > 0) m_pht[pi]--;
        m_bht[bi] = (m_bht[bi] >> 1) | (HB'(upd.taken) << (HB - 1));
        if (upd.taken) begin
          ti = int'(upd.pc[2 +: 10]);
          m_bv[ti] = 1; m_bt[ti] = upd.target;
        end
      end
      @(negedge clk);
      check(pred.valid, "prediction valid");
      check(pred.taken == exp_taken, $sformatf("direction for %h", lookup_pc));
      check(pred.target_valid == exp_tv, "target valid");
      if (exp_tv) check(pred.target == exp_tgt, "target");
      predicted++;
      if (pred.taken != cur_out) mispredicts++;
      prev = cur; prev_out = cur_out;
    end
    $display("%s: BHT %0d x %0d bits, %0d address bits, %0d counters: %0d of %0d mispredicted",
             LABEL, BHT_N, HB, AB, PHT_N, mispredicts, predicted);
    done_o = 1;
  end
endmodule
