// tb_fcscan_scan_chains -- self-check of the scan chain bank (4 chains of 5
// cells) against a reference model kept as per-chain bit queues: random
// shifts, holds and captures, checking every cell and scan output each cycle.
module tb_fcscan_scan_chains;
  localparam int N = 4, L = 5;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, sck_en = 0, capture = 0;
  logic [N-1:0] si = '0, so;
  logic [N-1:0][L-1:0] cap_d = '0, q;

  fcscan_scan_chains #(.N_SC(N), .LEN(L)) dut (.clk, .rst_n, .sck_en, .capture,
                                               .si, .cap_d, .q, .so);
  always #5 clk = ~clk;

  bit model [N][L];   // model[i][p]: cell p of chain i (p = 0 at scan-in)
  int shifts = 0, caps = 0;

  initial begin
    foreach (model[i, p]) model[i][p] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      sck_en  = 1'($urandom_range(0, 2) != 0);
      capture = 1'($urandom_range(0, 9) == 0);
      si      = N'($urandom);
      cap_d   = {$urandom, $urandom};
      @(posedge clk);
      if (capture) begin
        for (int i = 0; i < N; i++) for (int p = 0; p < L; p++) model[i][p] = cap_d[i][p];
        caps++;
      end else if (sck_en) begin
        for (int i = 0; i < N; i++) begin
          for (int p = L - 1; p > 0; p--) model[i][p] = model[i][p-1];
          model[i][0] = si[i];
        end
        shifts++;
      end
      #1;
      for (int i = 0; i < N; i++) begin
        for (int p = 0; p < L; p++) begin
          checks++;
          if (q[i][p] !== model[i][p]) begin
            failures++; $display("FAIL t=%0d chain %0d cell %0d", t, i, p);
          end
        end
        checks++;
        if (so[i] !== model[i][L-1]) begin failures++; $display("FAIL so %0d", i); end
      end
      @(negedge clk);
    end
    checks++;
    if (shifts == 0 || caps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
