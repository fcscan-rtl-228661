// fcscan_workload_run -- drives one benchmark-sized FCSCAN configuration
// (testbench helper, instantiated by tb_fcscan_workloads).
//
// Scan chains:  N_SC chains of L = ceil(FFS / N_SC) cells.
// Clusters:     N_CL decompressor outputs; chain i belongs to cluster
//               i mod N_CL, with inverters on a fixed pseudo-random set of
//               chains and clusters (the real map would come from
//               clustering the circuit's test set).  With BASIC set, N_CL
//               must equal N_SC: one output per chain, no inverters.
// Test data:    VECTORS random test cubes with care-bit density PS_PM per
//               mille.  Each slice gets a number of coded bits such that the
//               whole set has exactly TE_WORDS - VECTORS * L coded bits, so
//               that the compressed stream is TE_WORDS words of M bits.
// Checks:       after every pattern, each specified bit must be in its scan
//               cell; at the end, the decompressor must have taken exactly
//               TE_WORDS words (one per cycle, pauses excluded) and shifted
//               VECTORS * L slices.
module fcscan_workload_run
  import fcscan_pkg::*;
#(
  parameter string       NAME     = "s13207/200",
  parameter int unsigned N_SC     = 200,
  parameter int unsigned N_CL     = 30,
  parameter int unsigned FFS      = 700,
  parameter int unsigned VECTORS  = 251,
  parameter int unsigned TE_WORDS = 2058,
  parameter int unsigned PS_PM    = 44,
  parameter bit          BASIC    = 1'b0   // basic scheme: one output per chain, no inverters
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned L = (FFS + N_SC - 1) / N_SC;
  localparam int unsigned M = chan_width(N_CL);

  typedef int unsigned map_t [N_SC];
  function automatic map_t mk_map();
    map_t m;
    for (int i = 0; i < N_SC; i++) m[i] = i % N_CL;
    return m;
  endfunction
  function automatic logic [N_SC-1:0] mk_chain_inv();
    logic [N_SC-1:0] v;
    for (int i = 0; i < N_SC; i++) v[i] = !BASIC && ((i * 37 + 11) % 5 == 0);
    return v;
  endfunction
  function automatic logic [N_CL-1:0] mk_cl_inv();
    logic [N_CL-1:0] v;
    for (int c = 0; c < N_CL; c++) v[c] = !BASIC && (c % 3 == 1);
    return v;
  endfunction
  localparam map_t            MAP    = mk_map();
  localparam logic [N_SC-1:0] CH_INV = mk_chain_inv();
  localparam logic [N_CL-1:0] CL_INV = mk_cl_inv();

  logic clk = 0, rst_n = 0, tvalid = 0, capture = 0, misr_clear = 0;
  logic [M-1:0] tdata = '0;
  logic [N_SC-1:0] misr_sig;
  logic [N_SC-1:0][L-1:0] scan_q, cap_d;
  mode_e ms;
  logic cck_en, sck_en;

  assign cap_d = '0;

  fcscan_top #(.N_SC(N_SC), .N_CL(N_CL), .SCAN_LEN(L), .CLUSTER_OF(MAP),
               .CLUSTER_INV(CL_INV), .CHAIN_INV(CH_INV), .MISR_POLY('0)) dut (
    .clk, .rst_n, .tvalid, .tdata, .capture, .misr_clear, .misr_sig,
    .scan_q, .cap_d, .ms, .cck_en, .sck_en);

  always #5 clk = ~clk;

  int unsigned words_taken = 0, shifts = 0;
  always @(posedge clk) if (rst_n) begin
    if (cck_en) words_taken++;
    if (sck_en) shifts++;
  end

  logic [N_SC-1:0] care [L], val [L];

  initial begin
    int unsigned slices, coded_total, base, rem, sidx;
    logic [M-1:0] q [$];
    done = 0; checks = 0; failures = 0;
    slices = VECTORS * L;
    coded_total = TE_WORDS - slices;
    base = coded_total / slices;
    rem  = coded_total % slices;
    if (TE_WORDS < slices || base + 1 > (N_CL - 1) / 2 || base + 1 >= (1 << (M - 1))) begin
      failures++; $display("FAIL %s: coded bits do not fit", NAME);
    end
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    sidx = 0;
    for (int p = 0; p < VECTORS; p++) begin
      for (int j = 0; j < L; j++) begin
        int unsigned n;
        bit b;
        logic [N_CL-1:0] flip, d;
        logic [N_CL-1:0] seen;
        n = base + ((sidx < rem) ? 1 : 0);
        sidx++;
        b = 1'($urandom);
        flip = '0;
        while ($countones(flip) < n) flip[$urandom_range(0, N_CL - 1)] = 1'b1;
        d = {N_CL{b}} ^ flip;
        seen = '0;
        for (int i = 0; i < N_SC; i++) begin
          int unsigned c;
          c = MAP[i];
          care[j][i] = !seen[c] || ($urandom_range(0, 999) < PS_PM);
          seen[c] = 1'b1;
          val[j][i] = d[c] ^ CL_INV[c] ^ CH_INV[i];
        end
        // Encode: initial vector, then the minority positions.
        q.push_back({b, (M-1)'(n)});
        for (int c = 0; c < N_CL; c++) if (flip[c]) q.push_back(M'(c + 1));
      end
      while (q.size() > 0) begin
        tvalid = 1; tdata = q.pop_front();
        @(negedge clk);
      end
      tvalid = 0;
      @(negedge clk);   // last shift of this pattern
      for (int j = 0; j < L; j++)
        for (int i = 0; i < N_SC; i++)
          if (care[j][i]) begin
            checks++;
            if (scan_q[i][L-1-j] !== val[j][i]) begin
              failures++;
              if (failures < 10) $display("FAIL %s pattern %0d slice %0d chain %0d", NAME, p, j, i);
            end
          end
    end
    checks++;
    if (words_taken != TE_WORDS || shifts != slices) begin
      failures++;
      $display("FAIL %s: %0d words, %0d shifts (expected %0d, %0d)", NAME, words_taken, shifts, TE_WORDS, slices);
    end
    $display("%s: N_sc=%0d clusters=%0d M=%0d L=%0d slices=%0d coded=%0d |T_E|=%0d bits, %0d checks",
             NAME, N_SC, N_CL, M, L, slices, coded_total, M * words_taken, checks);
    done = 1;
  end
endmodule
