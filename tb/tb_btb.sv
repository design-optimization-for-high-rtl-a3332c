// tb_btb: checks the branch target buffer against a model.
// An 8-entry buffer starts with no valid entry. Random lookups and writes
// follow; a lookup's result appears one cycle later, shows the entry before
// any write in that cycle, reports valid only for entries written since
// reset, and returns the written target with its two low bits zero.
module tb_btb;
  import bp_pkg::*;
  localparam int unsigned ENTRIES = 8, IW = 3;

  logic clk = 0, rst_n = 0;
  logic rd_en, wr_en, rd_valid;
  logic [IW-1:0] rd_idx, wr_idx;
  pc_t wr_target, rd_target;
  logic m_valid [ENTRIES];
  pc_t  m_tgt [ENTRIES];
  logic exp_valid;
  pc_t  exp_tgt;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  btb #(.ENTRIES(ENTRIES)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .rd_en_i(rd_en), .rd_idx_i(rd_idx), .rd_valid_o(rd_valid), .rd_target_o(rd_target),
    .wr_en_i(wr_en), .wr_idx_i(wr_idx), .wr_target_i(wr_target)
  );

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_idx = 0; wr_idx = 0; wr_target = 0;
    for (int i = 0; i < ENTRIES; i++) begin m_valid[i] = 0; m_tgt[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_valid = 0; exp_tgt = 0;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      rd_en     = $urandom_range(3) != 0;
      wr_en     = (n > 20) && ($urandom_range(3) == 0);
      rd_idx    = IW'($urandom);
      wr_idx    = (n % 6 == 0) ? rd_idx : IW'($urandom);
      wr_target = $urandom;
      @(posedge clk);
      if (rd_en) begin
        exp_valid = m_valid[rd_idx];
        exp_tgt   = m_tgt[rd_idx];
        if (exp_valid) hits++; else misses++;
      end
      if (wr_en) begin
        m_valid[wr_idx] = 1;
        m_tgt[wr_idx]   = {wr_target[31:2], 2'b00};
      end
      @(negedge clk);
      check(rd_valid == exp_valid, "valid bit");
      if (exp_valid) check(rd_target == exp_tgt, $sformatf("target %h want %h", rd_target, exp_tgt));
    end
    check(hits > 0 && misses > 0, "both hits and misses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
