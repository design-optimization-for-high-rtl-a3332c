// tb_pas_configs: runs the predictor in the configurations that were
// evaluated for it, side by side on one clock, each against its own reference
// model (see pas_config_run):
//   - the best configuration per budget (512 B to 16 KB) for the SPEC CINT95
//     and the IBS programs, labelled (history bits, address bits) at a number
//     of history registers;
//   - the PAg predictors (no address bits) with 8 and 14 history bits and
//     128, 1K and 4K history registers used to compare tagless with tagged
//     history tables.
// Real program traces are not available here; a synthetic branch stream
// stands in for them, so the misprediction rates printed only show that the
// predictor learns, and are not comparable with published figures.
module tb_pas_configs;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NC = 18;
  logic done [NC];
  int   chk  [NC];
  int   fail [NC];
  int   checks = 0, failures = 0;

  // SPEC CINT95 optimum per budget
  pas_config_run #(.BHT_N(1024), .HB(2),  .AB(8), .LABEL("SPEC 512B (2,8) 1K"))  c0  (clk, done[0],  chk[0],  fail[0]);
  pas_config_run #(.BHT_N(2048), .HB(3),  .AB(7), .LABEL("SPEC 1KB (3,7) 2K"))   c1  (clk, done[1],  chk[1],  fail[1]);
  pas_config_run #(.BHT_N(2048), .HB(7),  .AB(4), .LABEL("SPEC 2KB (7,4) 2K"))   c2  (clk, done[2],  chk[2],  fail[2]);
  pas_config_run #(.BHT_N(2048), .HB(9),  .AB(4), .LABEL("SPEC 4KB (9,4) 2K"))   c3  (clk, done[3],  chk[3],  fail[3]);
  pas_config_run #(.BHT_N(4096), .HB(10), .AB(4), .LABEL("SPEC 8KB (10,4) 4K"))  c4  (clk, done[4],  chk[4],  fail[4]);
  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .LABEL("SPEC 16KB (11,4) 8K")) c5  (clk, done[5],  chk[5],  fail[5]);
  // IBS optimum per budget
  pas_config_run #(.BHT_N(2048), .HB(1),  .AB(9), .LABEL("IBS 512B (1,9) 2K"))   c6  (clk, done[6],  chk[6],  fail[6]);
  pas_config_run #(.BHT_N(2048), .HB(2),  .AB(9), .LABEL("IBS 1KB (2,9) 2K"))    c7  (clk, done[7],  chk[7],  fail[7]);
  pas_config_run #(.BHT_N(4096), .HB(3),  .AB(8), .LABEL("IBS 2KB (3,8) 4K"))    c8  (clk, done[8],  chk[8],  fail[8]);
  pas_config_run #(.BHT_N(8192), .HB(4),  .AB(7), .LABEL("IBS 4KB (4,7) 8K"))    c9  (clk, done[9],  chk[9],  fail[9]);
  pas_config_run #(.BHT_N(8192), .HB(5),  .AB(9), .LABEL("IBS 8KB (5,9) 8K"))    c10 (clk, done[10], chk[10], fail[10]);
  pas_config_run #(.BHT_N(8192), .HB(9),  .AB(6), .LABEL("IBS 16KB (9,6) 8K"))   c11 (clk, done[11], chk[11], fail[11]);
  // PAg predictors of the tagless/tagged comparison
  pas_config_run #(.BHT_N(128),  .HB(8),  .AB(0), .LABEL("PAg 8-bit 128"))  c12 (clk, done[12], chk[12], fail[12]);
  pas_config_run #(.BHT_N(1024), .HB(8),  .AB(0), .LABEL("PAg 8-bit 1K"))   c13 (clk, done[13], chk[13], fail[13]);
  pas_config_run #(.BHT_N(4096), .HB(8),  .AB(0), .LABEL("PAg 8-bit 4K"))   c14 (clk, done[14], chk[14], fail[14]);
  pas_config_run #(.BHT_N(128),  .HB(14), .AB(0), .LABEL("PAg 14-bit 128")) c15 (clk, done[15], chk[15], fail[15]);
  pas_config_run #(.BHT_N(1024), .HB(14), .AB(0), .LABEL("PAg 14-bit 1K"))  c16 (clk, done[16], chk[16], fail[16]);
  pas_config_run #(.BHT_N(4096), .HB(14), .AB(0), .LABEL("PAg 14-bit 4K"))  c17 (clk, done[17], chk[17], fail[17]);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic all_done;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < NC; i++) all_done &= done[i];
    end while (!all_done);
    for (int i = 0; i < NC; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
