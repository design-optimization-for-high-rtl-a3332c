// tb_tagless_pas_predictor: end-to-end test of the predictor at its default
// sizes (8K history registers of 11 bits, 4 address bits, 1K BTB entries).
//
// A reference model in this file keeps its own history table, counter table
// and target buffer and computes every prediction independently. The test:
//   1. checks that ready_o rises exactly 2**(11+4) cycles after reset and
//      that lookups before that give no prediction;
//   2. trains one loop branch (taken three times, then not taken) alone and,
//      after warm-up, requires every prediction of it to be right: with at
//      least three history bits the period-4 pattern is fully predictable;
//   3. runs a random mix of branches with different behaviours, some of
//      which share a history register (same low address bits), comparing
//      every prediction with the model cycle by cycle;
//   4. counts each mechanism of the design and fails if one never occurred:
//      a lookup ignored before ready, a history register shared by two
//      branches and shifted on without flushing, both saturation limits of
//      the counters, BTB writes, hits and misses, a BTB entry overwritten by
//      another branch, and a lookup in the same cycle as an update of the
//      same entry (which must see the old state).
module tb_tagless_pas_predictor;
  import bp_pkg::*;
  localparam int unsigned BHT_N = 8192, HB = 11, AB = 4, BTB_N = 1024;
  localparam int unsigned PHT_N = 1 << (HB + AB);

  logic clk = 0, rst_n = 0;
  logic ready;
  logic lookup_valid;
  pc_t  lookup_pc;
  bp_predict_t pred;
  bp_update_t  upd;

  tagless_pas_predictor dut (
    .clk_i(clk), .rst_ni(rst_n), .ready_o(ready),
    .lookup_valid_i(lookup_valid), .lookup_pc_i(lookup_pc),
    .pred_o(pred), .upd_i(upd)
  );

  always #5 clk = ~clk;

  // reference model
  logic [HB-1:0] m_bht [BHT_N];
  int            m_pht [PHT_N];
  logic          m_bv  [BTB_N];
  pc_t           m_bt  [BTB_N];
  pc_t           m_bht_owner [BHT_N];
  pc_t           m_btb_owner [BTB_N];

  int checks = 0, failures = 0;
  int n_ignored = 0, n_noflush = 0, n_sat_hi = 0, n_sat_lo = 0;
  int n_btb_wr = 0, n_btb_hit = 0, n_btb_miss = 0, n_btb_replace = 0, n_collide = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int bidx(pc_t pc);  return int'(pc[2 +: 13]); endfunction
  function automatic int tidx(pc_t pc);  return int'(pc[2 +: 10]); endfunction
  function automatic int pidx(logic [HB-1:0] h, pc_t pc);
    return int'(h) * (1 << AB) + int'(pc[2 +: AB]);
  endfunction

  // expected prediction for a lookup, from the model state before this edge
  logic exp_valid, exp_taken, exp_tv;
  pc_t  exp_tgt;

  // One clock: inputs are already set (at a negedge). At the posedge the model
  // computes the expected prediction and applies the update; at the following
  // negedge the DUT's prediction is compared.
  task automatic step();
    int bi, pi, ti;
    logic [HB-1:0] h;
    @(posedge clk);
    exp_valid = lookup_valid && ready;
    if (lookup_valid && !ready) n_ignored++;
    if (exp_valid) begin
      bi = bidx(lookup_pc);
      exp_taken = m_pht[pidx(m_bht[bi], lookup_pc)] >= 2;
      exp_tv    = m_bv[tidx(lookup_pc)];
      exp_tgt   = m_bt[tidx(lookup_pc)];
      if (exp_tv) n_btb_hit++; else n_btb_miss++;
      if (upd.valid && bidx(upd.pc) == bi) n_collide++;
    end
    if (upd.valid && ready) begin
      bi = bidx(upd.pc);
      h  = m_bht[bi];
      pi = pidx(h, upd.pc);
      if (upd.taken) begin
        if (m_pht[pi] == 3) n_sat_hi++; else m_pht[pi]++;
      end else begin
        if (m_pht[pi] == 0) n_sat_lo++; else m_pht[pi]--;
      end
      if (m_bht_owner[bi] != upd.pc && m_bht_owner[bi] != '1) n_noflush++;
      m_bht_owner[bi] = upd.pc;
      m_bht[bi] = {upd.taken, h[HB-1:1]};
      if (upd.taken) begin
        ti = tidx(upd.pc);
        if (m_bv[ti] && m_btb_owner[ti] != upd.pc) n_btb_replace++;
        m_bv[ti] = 1'b1;
        m_bt[ti] = {upd.target[31:2], 2'b00};
        m_btb_owner[ti] = upd.pc;
        n_btb_wr++;
      end
    end
    @(negedge clk);
    check(pred.valid == exp_valid, "prediction valid");
    if (exp_valid) begin
      check(pred.taken == exp_taken, $sformatf("direction for %h", lookup_pc));
      check(pred.target_valid == exp_tv, $sformatf("target valid for %h", lookup_pc));
      if (exp_tv) check(pred.target == exp_tgt, $sformatf("target for %h", lookup_pc));
    end
  endtask

  // Branch behaviours of the random mix
  localparam int NB = 12;
  pc_t pcs [NB];
  int  kind [NB];   // 0 loop-4, 1 always taken, 2 never taken, 3 random, 4 alternate
  int  iter [NB];

  function automatic logic outcome(int b);
    unique case (kind[b])
      0: return (iter[b] % 4) != 3;
      1: return 1'b1;
      2: return 1'b0;
      3: return $urandom_range(1) == 1;
      default: return iter[b][0];
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, loop_ok;
    pc_t a;
    for (int i = 0; i < BHT_N; i++) begin m_bht[i] = '0; m_bht_owner[i] = '1; end
    for (int i = 0; i < PHT_N; i++) m_pht[i] = 1;
    for (int i = 0; i < BTB_N; i++) begin m_bv[i] = 0; m_bt[i] = '0; m_btb_owner[i] = '1; end
    lookup_valid = 0; lookup_pc = '0; upd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1. start-up clearing
    cycles = 0;
    lookup_valid = 1; lookup_pc = 32'h0040_0100;
    while (!ready) begin
      step();
      cycles++;
    end
    check(cycles == PHT_N, $sformatf("ready after %0d cycles", cycles));
    lookup_valid = 0;

    // 2. one loop branch alone: lookup, then resolve it
    a = 32'h0040_1230;
    loop_ok = 0;
    for (int i = 0; i < 80; i++) begin
      logic o;
      o = (i % 4) != 3;
      lookup_valid = 1; lookup_pc = a; upd = '0;
      step();
      if (i >= 40) begin
        check(pred.taken == o, $sformatf("loop branch iteration %0d", i));
        if (pred.taken == o) loop_ok++;
      end
      lookup_valid = 0;
      upd.valid = 1; upd.pc = a; upd.taken = o; upd.target = 32'h0040_1000;
      step();
      upd = '0;
    end
    $display("loop branch: %0d of 40 predictions right after warm-up", loop_ok);

    // 3. random mix; pcs[0..3] share one history register, pcs[4],pcs[5]
    //    share one BTB entry but not a history register
    pcs[0] = 32'h0010_0040; pcs[1] = pcs[0] + 32'h0000_8000;
    pcs[2] = pcs[0] + 32'h0001_0000; pcs[3] = pcs[0] + 32'h0002_0004 - 4;
    pcs[4] = 32'h0020_0200; pcs[5] = pcs[4] + 32'h0000_1000;
    for (int b = 6; b < NB; b++) pcs[b] = 32'h0030_0000 + 32'(b * 68);
    for (int b = 0; b < NB; b++) begin kind[b] = b % 5; iter[b] = 0; end
    kind[4] = 1; kind[5] = 1;
    for (int n = 0; n < 20000; n++) begin
      int lb, ub;
      lb = $urandom_range(NB - 1);
      ub = (n % 9 == 0) ? lb : $urandom_range(NB - 1);
      lookup_valid = $urandom_range(3) != 0;
      lookup_pc    = pcs[lb];
      upd.valid    = $urandom_range(3) != 0;
      upd.pc       = pcs[ub];
      upd.taken    = outcome(ub);
      upd.target   = pcs[ub] - 32'h100 + 32'(ub * 4);
      if (upd.valid) iter[ub]++;
      step();
    end
    upd = '0; lookup_valid = 0;
    step();

    $display("ignored=%0d noflush=%0d sat_hi=%0d sat_lo=%0d btb_wr=%0d btb_hit=%0d btb_miss=%0d btb_replace=%0d collide=%0d",
             n_ignored, n_noflush, n_sat_hi, n_sat_lo, n_btb_wr, n_btb_hit, n_btb_miss,
             n_btb_replace, n_collide);
    check(n_ignored > 0, "lookup before ready");
    check(n_noflush > 0, "shared history register (no flush)");
    check(n_sat_hi > 0, "counter saturated at 3");
    check(n_sat_lo > 0, "counter saturated at 0");
    check(n_btb_wr > 0, "BTB write");
    check(n_btb_hit > 0, "BTB hit");
    check(n_btb_miss > 0, "BTB miss");
    check(n_btb_replace > 0, "BTB entry replaced by another branch");
    check(n_collide > 0, "lookup and update of one entry in a cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
