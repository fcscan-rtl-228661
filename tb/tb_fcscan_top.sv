// tb_fcscan_top -- end-to-end self-check of the FCSCAN test path at its
// default size (ten chains, four clusters, three channels, eight slices).
//
// The testbench plays the tester.  It codes test cubes with its own encoder
// (per cluster the value the decompressor must deliver, majority value in
// the initial vector, one configuration vector per minority bit) and:
//   pattern A  the eight test cubes of the worked example; it must cost 13
//              words (5 coded bits, 39 bits on 3 channels) and every
//              specified bit must be in the chains after the last shift;
//   capture    response R1 is captured while the first slice of pattern B
//              waits for its shift;
//   pattern B  random cubes, sent with random tester pauses; R1 leaves
//              through the MISR, whose signature is checked;
//   unload     capture R2, shift it out with eight one-word slices, check
//              the signature again.
// Each mechanism (broadcast and configuration words, slices without coded
// bits, shift overlapped with the next initial vector, capture, a shift
// held by capture, tester pause, MISR compaction, both broadcast values) is
// counted and must occur at least once.
module tb_fcscan_top;
  import fcscan_pkg::*;
  localparam int N   = EX_N_SC;
  localparam int NCL = EX_N_CL;
  localparam int L   = EX_SCAN_LEN;
  localparam int M   = chan_width(NCL);

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, tvalid = 0, capture = 0, misr_clear = 0;
  logic [M-1:0] tdata = '0;
  logic [N-1:0] misr_sig;
  logic [N-1:0][L-1:0] scan_q, cap_d = '0;
  mode_e ms;
  logic cck_en, sck_en;

  fcscan_top dut (.clk, .rst_n, .tvalid, .tdata, .capture, .misr_clear, .misr_sig,
                  .scan_q, .cap_d, .ms, .cck_en, .sck_en);

  always #5 clk = ~clk;

  // A test cube: care mask and values per chain, one entry per slice.
  typedef struct { logic [N-1:0] care; logic [N-1:0] val; } slice_t;
  slice_t cube_a [L], cube_b [L];

  string table_a [L] = '{"000100XXXX", "10X0011XXX", "1X01XXXXXX", "00111X1X0X",
                         "X0X1XX11X1", "0X0XX0XX0X", "X11XXXXXXX", "1XX0X11X1X"};

  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  // Encode one slice into tester words; returns the number of coded bits.
  function automatic int encode(slice_t s, ref logic [M-1:0] q [$]);
    bit have [NCL], need [NCL];
    int ones = 0, spec = 0, n = 0;
    bit b;
    foreach (have[c]) begin have[c] = 0; need[c] = 0; end
    for (int i = 0; i < N; i++) begin
      if (s.care[i]) begin
        int c = EX_CLUSTER_OF[i];
        bit d = s.val[i] ^ EX_CHAIN_INV[i] ^ EX_CLUSTER_INV[c];
        if (have[c] && need[c] != d) begin
          failures++; $display("FAIL cube not encodable with this fan-out");
        end
        have[c] = 1; need[c] = d;
      end
    end
    foreach (have[c]) if (have[c]) begin spec++; ones += need[c]; end
    b = (2 * ones > spec);
    n = b ? spec - ones : ones;
    q.push_back({b, (M-1)'(n)});
    foreach (have[c]) if (have[c] && need[c] != b) q.push_back(M'(c + 1));
    return n;
  endfunction

  // Reference MISR step.
  function automatic logic [N-1:0] misr_step(logic [N-1:0] s, logic [N-1:0] d);
    logic [N:0] t = {s, 1'b0} ^ {1'b0, d};
    if (t[N]) t = t ^ {1'b1, EX_MISR_POLY};
    return t[N-1:0];
  endfunction

  // Mechanism counters.
  int n_bcast = 0, n_conf = 0, n_overlap = 0, n_capture = 0, n_cap_hold = 0,
      n_pause = 0, n_misr = 0, n_zero = 0, n_init1 = 0, n_init0 = 0;
  int cyc = 0, first_word_cyc = -1, last_sck_cyc = -1;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (cck_en && ms == MS_BROADCAST) n_bcast++;
    if (cck_en && ms == MS_CONFIG)    n_conf++;
    if (sck_en && cck_en && ms == MS_BROADCAST) n_overlap++;
    if (capture) n_capture++;
    if (capture && dut.u_decomp.u_dcu.pending_q) n_cap_hold++;
    if (sck_en) begin n_misr++; last_sck_cyc = cyc; end
  end

  task automatic send(logic [M-1:0] q [$], bit pauses);
    foreach (q[w]) begin
      while (pauses && $urandom_range(0, 3) == 0) begin
        tvalid = 0; n_pause++; @(negedge clk);
      end
      tvalid = 1; tdata = q[w];
      if (first_word_cyc < 0) first_word_cyc = cyc;
      @(negedge clk);
    end
    tvalid = 0;
  endtask

  function automatic void note_slice(logic [M-1:0] init);
    if (init[M-2:0] == '0) n_zero++;
    if (init[M-1]) n_init1++; else n_init0++;
  endfunction

  task automatic check_chains(slice_t cube [L], string tag);
    for (int j = 0; j < L; j++)
      for (int i = 0; i < N; i++)
        if (cube[j].care[i])
          chk(scan_q[i][L-1-j] == cube[j].val[i], $sformatf("%s slice %0d chain c%0d", tag, j+1, i+1));
  endtask

  initial begin
    logic [M-1:0] wa [$], wb [$], wb0 [$], wu [$];
    logic [N-1:0] sig_exp;
    int coded_a = 0, words_a;

    for (int j = 0; j < L; j++)
      for (int i = 0; i < N; i++) begin
        cube_a[j].care[i] = (table_a[j][i] != "X");
        cube_a[j].val[i]  = (table_a[j][i] == "1");
      end
    // Random cubes for pattern B, consistent with the cluster map; the first
    // slice is uniform so that it has no coded bits.
    for (int j = 0; j < L; j++) begin
      logic [NCL-1:0] d;
      d = (j == 0) ? '0 : NCL'($urandom);
      for (int i = 0; i < N; i++) begin
        int c;
        c = EX_CLUSTER_OF[i];
        cube_b[j].care[i] = (j == 0) ? 1'b1 : 1'($urandom_range(0, 1));
        cube_b[j].val[i]  = d[c] ^ EX_CLUSTER_INV[c] ^ EX_CHAIN_INV[i];
      end
    end
    for (int j = 0; j < L; j++) begin
      int nb0;
      nb0 = wa.size();
      coded_a += encode(cube_a[j], wa);
      note_slice(wa[nb0]);
    end
    words_a = wa.size();
    chk(coded_a == 5, $sformatf("pattern A coded bits %0d, expected 5", coded_a));
    chk(words_a * M == 39, $sformatf("pattern A %0d bits, expected 39", words_a * M));
    void'(encode(cube_b[0], wb0));
    note_slice(wb0[0]);
    for (int j = 1; j < L; j++) begin
      int nb0;
      nb0 = wb.size();
      void'(encode(cube_b[j], wb));
      note_slice(wb[nb0]);
    end

    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    misr_clear = 1; @(negedge clk); misr_clear = 0;

    // Pattern A, back to back, then B's first initial vector with A's last shift.
    send(wa, 0);
    send(wb0, 0);
    // Word w is taken in cycle w (from 0); the last slice shifts in cycle words_a.
    chk(last_sck_cyc - (first_word_cyc + 1) == words_a,
        $sformatf("pattern A shifted out in cycle %0d, expected %0d",
                  last_sck_cyc - (first_word_cyc + 1), words_a));
    check_chains(cube_a, "A");

    // Capture R1 (B's first slice is pending and must wait).
    for (int i = 0; i < N; i++) cap_d[i] = L'($urandom);
    capture = 1; misr_clear = 1; @(negedge clk);
    capture = 0; misr_clear = 0;
    sig_exp = '0;
    for (int t = 0; t < L; t++) begin
      logic [N-1:0] so;
      for (int i = 0; i < N; i++) so[i] = cap_d[i][L-1-t];
      sig_exp = misr_step(sig_exp, so);
    end

    // Pattern B with pauses, then one idle cycle for the last shift.
    send(wb, 1);
    @(negedge clk);
    check_chains(cube_b, "B");
    chk(misr_sig == sig_exp, $sformatf("signature after B %h, expected %h", misr_sig, sig_exp));

    // Capture R2 and unload it with eight one-word slices.
    for (int i = 0; i < N; i++) cap_d[i] = L'($urandom);
    capture = 1; misr_clear = 1; @(negedge clk);
    capture = 0; misr_clear = 0;
    sig_exp = '0;
    for (int t = 0; t < L; t++) begin
      logic [N-1:0] so;
      for (int i = 0; i < N; i++) so[i] = cap_d[i][L-1-t];
      sig_exp = misr_step(sig_exp, so);
      wu.push_back({1'b1, (M-1)'(0)});
    end
    send(wu, 0);
    @(negedge clk);
    chk(misr_sig == sig_exp, $sformatf("signature after unload %h, expected %h", misr_sig, sig_exp));
    for (int i = 0; i < N; i++)
      chk(scan_q[i] == {L{1'b1 ^ EX_CHAIN_INV[i] ^ EX_CLUSTER_INV[EX_CLUSTER_OF[i]]}},
          $sformatf("unload fill chain c%0d", i+1));

    $display("mechanisms: broadcast=%0d configuration=%0d zero-coded slices=%0d overlap=%0d capture=%0d capture-hold=%0d pause=%0d misr=%0d init0=%0d init1=%0d",
             n_bcast, n_conf, n_zero, n_overlap, n_capture, n_cap_hold, n_pause, n_misr, n_init0, n_init1);
    chk(n_bcast > 0, "broadcast mode never used");
    chk(n_conf > 0, "configuration mode never used");
    chk(n_zero > 0, "no slice without coded bits");
    chk(n_overlap > 0, "no shift overlapped with an initial vector");
    chk(n_capture > 0, "no capture");
    chk(n_cap_hold > 0, "no shift held by capture");
    chk(n_pause > 0, "no tester pause");
    chk(n_misr == 3 * L, $sformatf("MISR steps %0d, expected %0d", n_misr, 3 * L));
    chk(n_init0 > 0 && n_init1 > 0, "both broadcast values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
