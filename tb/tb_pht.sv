// tb_pht: checks the second-level counter table against a model.
// A 3-history-bit, 2-address-bit table (32 counters) is cleared after reset;
// the clearing must take 32 cycles and leave every counter at CTR_INIT. Then
// random lookups and updates run: a lookup's counter appears one cycle later
// and is the value before any update in the same cycle, and an update moves
// the counter at row=history, column=address one step towards the outcome,
// saturating at 0 and 3. The model computes the index and the counting on
// its own, without the design's helper.
module tb_pht;
  import bp_pkg::*;
  localparam int unsigned HB = 3, AB = 2, DEPTH = 1 << (HB + AB);

  logic clk = 0, rst_n = 0;
  logic done;
  logic rd_en, upd_en, upd_taken;
  logic [HB-1:0] rd_hist, upd_hist;
  logic [AB-1:0] rd_addr, upd_addr;
  ctr_t rd_ctr;
  int model [DEPTH];
  int exp_rd;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  pht #(.HIST_BITS(HB), .ADDR_BITS(AB), .CTR_INIT(CTR_WEAK_T)) dut (
    .clk_i(clk), .rst_ni(rst_n), .init_done_o(done),
    .rd_en_i(rd_en), .rd_hist_i(rd_hist), .rd_addr_i(rd_addr), .rd_ctr_o(rd_ctr),
    .upd_en_i(upd_en), .upd_hist_i(upd_hist), .upd_addr_i(upd_addr),
    .upd_taken_i(upd_taken)
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    rd_en = 0; upd_en = 0; upd_taken = 0;
    rd_hist = 0; rd_addr = 0; upd_hist = 0; upd_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == DEPTH, $sformatf("clear took %0d cycles", cycles));
    for (int i = 0; i < DEPTH; i++) model[i] = 2;
    // read every counter once after clearing
    for (int i = 0; i <= DEPTH; i++) begin
      if (i > 0) check(int'(rd_ctr) == 2, $sformatf("counter %0d after clear", i - 1));
      rd_en = (i < DEPTH);
      {rd_hist, rd_addr} = (HB + AB)'(i);
      @(negedge clk);
    end
    exp_rd = 2;
    for (int n = 0; n < 3000; n++) begin
      int ri, ui;
      rd_en     = $urandom_range(1) == 1;
      upd_en    = $urandom_range(3) != 0;
      rd_hist   = HB'($urandom); rd_addr = AB'($urandom);
      // few indices so that counters reach both ends
      upd_hist  = HB'($urandom_range(1)); upd_addr = AB'($urandom_range(1));
      if (n % 5 == 0) begin rd_hist = upd_hist; rd_addr = upd_addr; end
      upd_taken = (n < 1500) ? ($urandom_range(3) != 0) : ($urandom_range(3) == 0);
      ri = rd_hist * (1 << AB) + rd_addr;
      ui = upd_hist * (1 << AB) + upd_addr;
      @(posedge clk);
      if (rd_en) exp_rd = model[ri];
      if (upd_en) begin
        if (upd_taken) begin
          if (model[ui] == 3) sat_hi++; else model[ui]++;
        end else begin
          if (model[ui] == 0) sat_lo++; else model[ui]--;
        end
      end
      @(negedge clk);
      check(int'(rd_ctr) == exp_rd, $sformatf("lookup %0d: got %0d want %0d", ri, rd_ctr, exp_rd));
    end
    check(sat_hi > 0 && sat_lo > 0, "both saturation limits reached");
    $display("saturated high %0d times, low %0d times", sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
