// tb_table1_workloads: the predictor at its default sizes (8K history
// registers of 11 bits, 4 address bits) run with synthetic branch streams
// shaped like fifteen integer programs: each stream has that program's number
// of static conditional branches (95 to 17,361), so that the larger ones must
// share history registers. The real traces, of 5 to 41 million dynamic
// branches each, are not available; each stream here runs NOPS branches and
// every prediction is checked against a reference model (see pas_config_run).
module tb_table1_workloads;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NW = 15;
  localparam int unsigned N = 300000;
  logic done [NW];
  int   chk  [NW];
  int   fail [NW];
  int   checks = 0, failures = 0;

  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .NOPS(N), .NSTATIC(95),    .LABEL("compress"))   w0  (clk, done[0],  chk[0],  fail[0]);
  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .NOPS(N), .NSTATIC(15647), .LABEL("gcc"))        w1  (clk, done[1],  chk[1],  fail[1]);
  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .NOPS(N), .NSTATIC(4742),  .LABEL("go"))         w2  (clk, done[2],  chk[2],  fail[2]);
  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .NOPS(N), .NSTATIC(902),   .LABEL("ljpeg"))      w3  (clk, done[3],  chk[3],  fail[3]);
  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .NOPS(N), .NSTATIC(345),   .LABEL("li"))         w4  (clk, done[4],  chk[4],  fail[4]);
  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .NOPS(N), .NSTATIC(1576),  .LABEL("perl"))       w5  (clk, done[5],  chk[5],  fail[5]);
  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .NOPS(N), .NSTATIC(5963),  .LABEL("vortex"))     w6  (clk, done[6],  chk[6],  fail[6]);
  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .NOPS(N), .NSTATIC(6333),  .LABEL("groff"))      w7  (clk, done[7],  chk[7],  fail[7]);
  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .NOPS(N), .NSTATIC(12852), .LABEL("gs"))         w8  (clk, done[8],  chk[8],  fail[8]);
  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .NOPS(N), .NSTATIC(5598),  .LABEL("mpeg_play"))  w9  (clk, done[9],  chk[9],  fail[9]);
  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .NOPS(N), .NSTATIC(5249),  .LABEL("nroff"))      w10 (clk, done[10], chk[10], fail[10]);
  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .NOPS(N), .NSTATIC(17361), .LABEL("real_gcc"))   w11 (clk, done[11], chk[11], fail[11]);
  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .NOPS(N), .NSTATIC(5310),  .LABEL("sdet"))       w12 (clk, done[12], chk[12], fail[12]);
  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .NOPS(N), .NSTATIC(4636),  .LABEL("verilog"))    w13 (clk, done[13], chk[13], fail[13]);
  pas_config_run #(.BHT_N(8192), .HB(11), .AB(4), .NOPS(N), .NSTATIC(4606),  .LABEL("video_play")) w14 (clk, done[14], chk[14], fail[14]);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic all_done;
    do begin
      @(posedge clk);
      all_done = 1;
      for (int i = 0; i < NW; i++) all_done &= done[i];
    end while (!all_done);
    for (int i = 0; i < NW; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
