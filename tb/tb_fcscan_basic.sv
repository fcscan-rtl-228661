// tb_fcscan_basic -- the basic FCSCAN scheme (no clustering): ten chains
// driven one-to-one by a ten-output decompressor on four channels.  The
// compressed stream of the basic example (18 words, 72 bits for 80 slice
// bits) must yield the published fully specified slices, each slice shifted
// in the cycle after its last word.
module tb_fcscan_basic;
  import fcscan_pkg::*;
  localparam int N = 10, L = 8, M = 4;
  localparam int unsigned IDENT [N] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9};
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, tvalid = 0, capture = 0, misr_clear = 0;
  logic [M-1:0] tdata = '0;
  logic [N-1:0] misr_sig;
  logic [N-1:0][L-1:0] scan_q, cap_d = '0;
  mode_e ms;
  logic cck_en, sck_en;

  fcscan_top #(.N_SC(N), .N_CL(N), .SCAN_LEN(L), .M(M), .CLUSTER_OF(IDENT),
               .CLUSTER_INV('0), .CHAIN_INV('0)) dut (
    .clk, .rst_n, .tvalid, .tdata, .capture, .misr_clear, .misr_sig,
    .scan_q, .cap_d, .ms, .cck_en, .sck_en);

  always #5 clk = ~clk;

  logic [M-1:0] words [18] = '{4'b0001, 4'b0100,
                               4'b1011, 4'b0010, 4'b0100, 4'b0101,
                               4'b1001, 4'b0011,
                               4'b1011, 4'b0001, 4'b0010, 4'b1001,
                               4'b1001, 4'b0010,
                               4'b0000,
                               4'b1000,
                               4'b1001, 4'b0100};
  string final_vec [L] = '{"0001000000", "1010011111", "1101111111", "0011111101",
                           "1011111111", "0000000000", "1111111111", "1110111111"};
  int shifts = 0, cyc = 0, last = -1;

  always @(posedge clk) if (rst_n) begin
    if (sck_en) begin shifts++; last = cyc; end
    cyc++;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    cyc = 0;
    foreach (words[w]) begin tvalid = 1; tdata = words[w]; @(negedge clk); end
    tvalid = 0; @(negedge clk);
    checks++;
    if (shifts != L || last != 18) begin
      failures++; $display("FAIL %0d shifts, last in cycle %0d (exp 8, 18)", shifts, last);
    end
    for (int j = 0; j < L; j++)
      for (int i = 0; i < N; i++) begin
        checks++;
        if (scan_q[i][L-1-j] !== (final_vec[j][i] == "1")) begin
          failures++; $display("FAIL slice %0d chain c%0d", j+1, i+1);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
