// tb_fcscan_workloads -- every FCSCAN configuration of the benchmark
// table: five ISCAS'89 circuits at 50, 100 and 200 chains and the
// industrial design at 100, 200 and 400 chains, each in the basic scheme
// (one decompressor output per chain) and in the improved scheme (published
// cluster count), with the published channel count M and compressed size
// |T_E|.  Scan length is ceil(flip-flops / chains) and the number of slices
// is vectors * length.  The cubes are random (the real test sets are not
// available) but carry exactly the number of coded bits that |T_E| implies
// (|T_E| / M - slices), so each run must take exactly |T_E| / M tester
// words and load every specified bit correctly.
module tb_fcscan_workloads;
  localparam int NRUN = 36;
  logic [NRUN-1:0] done;
  int ck [NRUN], fl [NRUN];
  int checks = 0, failures = 0;

  // s13207/50 improved: |T_E| = 29520 bits on M = 6 channels
  fcscan_workload_run #(.NAME("s13207/50 improved"), .N_SC(50), .N_CL(50), .FFS(700), .VECTORS(251),
                        .TE_WORDS(4920), .PS_PM(44), .BASIC(0)) u0 (.done(done[0]), .checks(ck[0]), .failures(fl[0]));
  // s13207/50 basic: |T_E| = 30564 bits on M = 6 channels
  fcscan_workload_run #(.NAME("s13207/50 basic"), .N_SC(50), .N_CL(50), .FFS(700), .VECTORS(251),
                        .TE_WORDS(5094), .PS_PM(44), .BASIC(1)) u1 (.done(done[1]), .checks(ck[1]), .failures(fl[1]));
  // s13207/100 improved: |T_E| = 18132 bits on M = 6 channels
  fcscan_workload_run #(.NAME("s13207/100 improved"), .N_SC(100), .N_CL(61), .FFS(700), .VECTORS(251),
                        .TE_WORDS(3022), .PS_PM(44), .BASIC(0)) u2 (.done(done[2]), .checks(ck[2]), .failures(fl[2]));
  // s13207/100 basic: |T_E| = 25830 bits on M = 7 channels
  fcscan_workload_run #(.NAME("s13207/100 basic"), .N_SC(100), .N_CL(100), .FFS(700), .VECTORS(251),
                        .TE_WORDS(3690), .PS_PM(44), .BASIC(1)) u3 (.done(done[3]), .checks(ck[3]), .failures(fl[3]));
  // s13207/200 improved: |T_E| = 10290 bits on M = 5 channels
  fcscan_workload_run #(.NAME("s13207/200 improved"), .N_SC(200), .N_CL(30), .FFS(700), .VECTORS(251),
                        .TE_WORDS(2058), .PS_PM(44), .BASIC(0)) u4 (.done(done[4]), .checks(ck[4]), .failures(fl[4]));
  // s13207/200 basic: |T_E| = 26304 bits on M = 8 channels
  fcscan_workload_run #(.NAME("s13207/200 basic"), .N_SC(200), .N_CL(200), .FFS(700), .VECTORS(251),
                        .TE_WORDS(3288), .PS_PM(44), .BASIC(1)) u5 (.done(done[5]), .checks(ck[5]), .failures(fl[5]));
  // s15850/50 improved: |T_E| = 20766 bits on M = 6 channels
  fcscan_workload_run #(.NAME("s15850/50 improved"), .N_SC(50), .N_CL(49), .FFS(611), .VECTORS(148),
                        .TE_WORDS(3461), .PS_PM(124), .BASIC(0)) u6 (.done(done[6]), .checks(ck[6]), .failures(fl[6]));
  // s15850/50 basic: |T_E| = 24024 bits on M = 6 channels
  fcscan_workload_run #(.NAME("s15850/50 basic"), .N_SC(50), .N_CL(50), .FFS(611), .VECTORS(148),
                        .TE_WORDS(4004), .PS_PM(124), .BASIC(1)) u7 (.done(done[7]), .checks(ck[7]), .failures(fl[7]));
  // s15850/100 improved: |T_E| = 12415 bits on M = 5 channels
  fcscan_workload_run #(.NAME("s15850/100 improved"), .N_SC(100), .N_CL(28), .FFS(611), .VECTORS(148),
                        .TE_WORDS(2483), .PS_PM(124), .BASIC(0)) u8 (.done(done[8]), .checks(ck[8]), .failures(fl[8]));
  // s15850/100 basic: |T_E| = 26873 bits on M = 7 channels
  fcscan_workload_run #(.NAME("s15850/100 basic"), .N_SC(100), .N_CL(100), .FFS(611), .VECTORS(148),
                        .TE_WORDS(3839), .PS_PM(124), .BASIC(1)) u9 (.done(done[9]), .checks(ck[9]), .failures(fl[9]));
  // s15850/200 improved: |T_E| = 7072 bits on M = 4 channels
  fcscan_workload_run #(.NAME("s15850/200 improved"), .N_SC(200), .N_CL(14), .FFS(611), .VECTORS(148),
                        .TE_WORDS(1768), .PS_PM(124), .BASIC(0)) u10 (.done(done[10]), .checks(ck[10]), .failures(fl[10]));
  // s15850/200 basic: |T_E| = 30056 bits on M = 8 channels
  fcscan_workload_run #(.NAME("s15850/200 basic"), .N_SC(200), .N_CL(200), .FFS(611), .VECTORS(148),
                        .TE_WORDS(3757), .PS_PM(124), .BASIC(1)) u11 (.done(done[11]), .checks(ck[11]), .failures(fl[11]));
  // s35932/50 improved: |T_E| = 17916 bits on M = 6 channels
  fcscan_workload_run #(.NAME("s35932/50 improved"), .N_SC(50), .N_CL(50), .FFS(1763), .VECTORS(35),
                        .TE_WORDS(2986), .PS_PM(141), .BASIC(0)) u12 (.done(done[12]), .checks(ck[12]), .failures(fl[12]));
  // s35932/50 basic: |T_E| = 22722 bits on M = 6 channels
  fcscan_workload_run #(.NAME("s35932/50 basic"), .N_SC(50), .N_CL(50), .FFS(1763), .VECTORS(35),
                        .TE_WORDS(3787), .PS_PM(141), .BASIC(1)) u13 (.done(done[13]), .checks(ck[13]), .failures(fl[13]));
  // s35932/100 improved: |T_E| = 13794 bits on M = 6 channels
  fcscan_workload_run #(.NAME("s35932/100 improved"), .N_SC(100), .N_CL(58), .FFS(1763), .VECTORS(35),
                        .TE_WORDS(2299), .PS_PM(141), .BASIC(0)) u14 (.done(done[14]), .checks(ck[14]), .failures(fl[14]));
  // s35932/100 basic: |T_E| = 23828 bits on M = 7 channels
  fcscan_workload_run #(.NAME("s35932/100 basic"), .N_SC(100), .N_CL(100), .FFS(1763), .VECTORS(35),
                        .TE_WORDS(3404), .PS_PM(141), .BASIC(1)) u15 (.done(done[15]), .checks(ck[15]), .failures(fl[15]));
  // s35932/200 improved: |T_E| = 8045 bits on M = 5 channels
  fcscan_workload_run #(.NAME("s35932/200 improved"), .N_SC(200), .N_CL(27), .FFS(1763), .VECTORS(35),
                        .TE_WORDS(1609), .PS_PM(141), .BASIC(0)) u16 (.done(done[16]), .checks(ck[16]), .failures(fl[16]));
  // s35932/200 basic: |T_E| = 27176 bits on M = 8 channels
  fcscan_workload_run #(.NAME("s35932/200 basic"), .N_SC(200), .N_CL(200), .FFS(1763), .VECTORS(35),
                        .TE_WORDS(3397), .PS_PM(141), .BASIC(1)) u17 (.done(done[17]), .checks(ck[17]), .failures(fl[17]));
  // s38417/50 improved: |T_E| = 58515 bits on M = 5 channels
  fcscan_workload_run #(.NAME("s38417/50 improved"), .N_SC(50), .N_CL(31), .FFS(1664), .VECTORS(183),
                        .TE_WORDS(11703), .PS_PM(134), .BASIC(0)) u18 (.done(done[18]), .checks(ck[18]), .failures(fl[18]));
  // s38417/50 basic: |T_E| = 88488 bits on M = 6 channels
  fcscan_workload_run #(.NAME("s38417/50 basic"), .N_SC(50), .N_CL(50), .FFS(1664), .VECTORS(183),
                        .TE_WORDS(14748), .PS_PM(134), .BASIC(1)) u19 (.done(done[19]), .checks(ck[19]), .failures(fl[19]));
  // s38417/100 improved: |T_E| = 53382 bits on M = 6 channels
  fcscan_workload_run #(.NAME("s38417/100 improved"), .N_SC(100), .N_CL(60), .FFS(1664), .VECTORS(183),
                        .TE_WORDS(8897), .PS_PM(134), .BASIC(0)) u20 (.done(done[20]), .checks(ck[20]), .failures(fl[20]));
  // s38417/100 basic: |T_E| = 92120 bits on M = 7 channels
  fcscan_workload_run #(.NAME("s38417/100 basic"), .N_SC(100), .N_CL(100), .FFS(1664), .VECTORS(183),
                        .TE_WORDS(13160), .PS_PM(134), .BASIC(1)) u21 (.done(done[21]), .checks(ck[21]), .failures(fl[21]));
  // s38417/200 improved: |T_E| = 29550 bits on M = 5 channels
  fcscan_workload_run #(.NAME("s38417/200 improved"), .N_SC(200), .N_CL(22), .FFS(1664), .VECTORS(183),
                        .TE_WORDS(5910), .PS_PM(134), .BASIC(0)) u22 (.done(done[22]), .checks(ck[22]), .failures(fl[22]));
  // s38417/200 basic: |T_E| = 105752 bits on M = 8 channels
  fcscan_workload_run #(.NAME("s38417/200 basic"), .N_SC(200), .N_CL(200), .FFS(1664), .VECTORS(183),
                        .TE_WORDS(13219), .PS_PM(134), .BASIC(1)) u23 (.done(done[23]), .checks(ck[23]), .failures(fl[23]));
  // s38584/50 improved: |T_E| = 53740 bits on M = 5 channels
  fcscan_workload_run #(.NAME("s38584/50 improved"), .N_SC(50), .N_CL(29), .FFS(1464), .VECTORS(288),
                        .TE_WORDS(10748), .PS_PM(60), .BASIC(0)) u24 (.done(done[24]), .checks(ck[24]), .failures(fl[24]));
  // s38584/50 basic: |T_E| = 84726 bits on M = 6 channels
  fcscan_workload_run #(.NAME("s38584/50 basic"), .N_SC(50), .N_CL(50), .FFS(1464), .VECTORS(288),
                        .TE_WORDS(14121), .PS_PM(60), .BASIC(1)) u25 (.done(done[25]), .checks(ck[25]), .failures(fl[25]));
  // s38584/100 improved: |T_E| = 32190 bits on M = 5 channels
  fcscan_workload_run #(.NAME("s38584/100 improved"), .N_SC(100), .N_CL(22), .FFS(1464), .VECTORS(288),
                        .TE_WORDS(6438), .PS_PM(60), .BASIC(0)) u26 (.done(done[26]), .checks(ck[26]), .failures(fl[26]));
  // s38584/100 basic: |T_E| = 80416 bits on M = 7 channels
  fcscan_workload_run #(.NAME("s38584/100 basic"), .N_SC(100), .N_CL(100), .FFS(1464), .VECTORS(288),
                        .TE_WORDS(11488), .PS_PM(60), .BASIC(1)) u27 (.done(done[27]), .checks(ck[27]), .failures(fl[27]));
  // s38584/200 improved: |T_E| = 21020 bits on M = 4 channels
  fcscan_workload_run #(.NAME("s38584/200 improved"), .N_SC(200), .N_CL(13), .FFS(1464), .VECTORS(288),
                        .TE_WORDS(5255), .PS_PM(60), .BASIC(0)) u28 (.done(done[28]), .checks(ck[28]), .failures(fl[28]));
  // s38584/200 basic: |T_E| = 85896 bits on M = 8 channels
  fcscan_workload_run #(.NAME("s38584/200 basic"), .N_SC(200), .N_CL(200), .FFS(1464), .VECTORS(288),
                        .TE_WORDS(10737), .PS_PM(60), .BASIC(1)) u29 (.done(done[29]), .checks(ck[29]), .failures(fl[29]));
  // ASIC1/100 improved: |T_E| = 510048 bits on M = 6 channels
  fcscan_workload_run #(.NAME("ASIC1/100 improved"), .N_SC(100), .N_CL(60), .FFS(8017), .VECTORS(246),
                        .TE_WORDS(85008), .PS_PM(120), .BASIC(0)) u30 (.done(done[30]), .checks(ck[30]), .failures(fl[30]));
  // ASIC1/100 basic: |T_E| = 733110 bits on M = 7 channels
  fcscan_workload_run #(.NAME("ASIC1/100 basic"), .N_SC(100), .N_CL(100), .FFS(8017), .VECTORS(246),
                        .TE_WORDS(104730), .PS_PM(120), .BASIC(1)) u31 (.done(done[31]), .checks(ck[31]), .failures(fl[31]));
  // ASIC1/200 improved: |T_E| = 391842 bits on M = 6 channels
  fcscan_workload_run #(.NAME("ASIC1/200 improved"), .N_SC(200), .N_CL(59), .FFS(8017), .VECTORS(246),
                        .TE_WORDS(65307), .PS_PM(120), .BASIC(0)) u32 (.done(done[32]), .checks(ck[32]), .failures(fl[32]));
  // ASIC1/200 basic: |T_E| = 806448 bits on M = 8 channels
  fcscan_workload_run #(.NAME("ASIC1/200 basic"), .N_SC(200), .N_CL(200), .FFS(8017), .VECTORS(246),
                        .TE_WORDS(100806), .PS_PM(120), .BASIC(1)) u33 (.done(done[33]), .checks(ck[33]), .failures(fl[33]));
  // ASIC1/400 improved: |T_E| = 292075 bits on M = 5 channels
  fcscan_workload_run #(.NAME("ASIC1/400 improved"), .N_SC(400), .N_CL(27), .FFS(8017), .VECTORS(246),
                        .TE_WORDS(58415), .PS_PM(120), .BASIC(0)) u34 (.done(done[34]), .checks(ck[34]), .failures(fl[34]));
  // ASIC1/400 basic: |T_E| = 951723 bits on M = 9 channels
  fcscan_workload_run #(.NAME("ASIC1/400 basic"), .N_SC(400), .N_CL(400), .FFS(8017), .VECTORS(246),
                        .TE_WORDS(105747), .PS_PM(120), .BASIC(1)) u35 (.done(done[35]), .checks(ck[35]), .failures(fl[35]));

  initial begin
    wait (&done);
    for (int r = 0; r < NRUN; r++) begin checks += ck[r]; failures += fl[r]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
