// tb_bht: checks the branch history table against a model array.
// A small table (16 entries of 5 bits) is cleared after reset; the test
// checks that init_done_o rises after exactly ENTRIES cycles and that every
// entry then reads HIST_INIT. Random reads and updates follow: both read
// ports must return the model's history, which is the pre-update value when
// the same entry is written in that cycle, and an update must shift the
// outcome in at the msb, dropping the lsb. Updates issued while the table is
// clearing must be ignored.
module tb_bht;
  localparam int unsigned ENTRIES = 16;
  localparam int unsigned HB      = 5;
  localparam int unsigned IW      = $clog2(ENTRIES);
  localparam logic [HB-1:0] INIT  = 5'b10110;

  logic clk = 0, rst_n = 0;
  logic done;
  logic [IW-1:0] rd_idx, upd_idx;
  logic [HB-1:0] rd_hist, upd_hist;
  logic upd_en, upd_taken;
  logic [HB-1:0] model [ENTRIES];
  int checks = 0, failures = 0;

  bht #(.ENTRIES(ENTRIES), .HIST_BITS(HB), .HIST_INIT(INIT)) dut (
    .clk_i(clk), .rst_ni(rst_n), .init_done_o(done),
    .rd_idx_i(rd_idx), .rd_hist_o(rd_hist),
    .upd_en_i(upd_en), .upd_idx_i(upd_idx), .upd_taken_i(upd_taken),
    .upd_hist_o(upd_hist)
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
    int cycles;
    upd_en = 0; upd_idx = 0; upd_taken = 0; rd_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // an update during clearing must be lost
    upd_en = 1; upd_idx = 3; upd_taken = 0;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      upd_en = 0;
      cycles++;
    end
    check(cycles == ENTRIES, $sformatf("clear took %0d cycles", cycles));
    for (int i = 0; i < ENTRIES; i++) begin
      model[i] = INIT;
      rd_idx = IW'(i);
      #1 check(rd_hist == INIT, $sformatf("entry %0d after clear", i));
    end
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      rd_idx    = IW'($urandom_range(ENTRIES - 1));
      upd_en    = ($urandom_range(3) != 0);
      upd_idx   = (n % 7 == 0) ? rd_idx : IW'($urandom_range(ENTRIES - 1));
      upd_taken = $urandom_range(1) == 1;
      #1;
      check(rd_hist == model[rd_idx], $sformatf("read entry %0d", rd_idx));
      check(upd_hist == model[upd_idx], $sformatf("update-port read entry %0d", upd_idx));
      @(posedge clk);
      if (upd_en) model[upd_idx] = {upd_taken, model[upd_idx][HB-1:1]};
    end
    @(negedge clk);
    upd_en = 0;
    for (int i = 0; i < ENTRIES; i++) begin
      rd_idx = IW'(i);
      #1 check(rd_hist == model[i], $sformatf("final entry %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
