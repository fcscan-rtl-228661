// tb_fcscan_decompressor -- self-check of DCU + decoder + FCN with the
// compressed data of the clustering example: four outputs k1..k4, three
// channels, eight slices in 16 words (48 bits).  At every sck the outputs
// must equal the specified scan-input slice, slices must appear in order,
// and the last slice must leave 17 cycles after the first word (one word
// per cycle, shift in the cycle after the last word).  A second run uses
// random slices coded by a reference encoder (majority value broadcast,
// minority bits flipped) with random tester pauses.
module tb_fcscan_decompressor;
  import fcscan_pkg::*;
  localparam int N = 4, M = 3;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, tvalid = 0, capture = 0;
  logic [M-1:0] tdata = '0;
  logic [N-1:0] k;
  logic sck_en, cck_en;
  mode_e ms;

  fcscan_decompressor #(.N_OUT(N)) dut (.clk, .rst_n, .tvalid, .tdata, .capture,
                                        .k, .sck_en, .ms, .cck_en);
  always #5 clk = ~clk;

  logic [M-1:0] words [16] = '{3'b001, 3'b010,  3'b001, 3'b001,  3'b101, 3'b100,
                               3'b010, 3'b010, 3'b100,  3'b001, 3'b010,
                               3'b001, 3'b010,  3'b100,  3'b001, 3'b001};
  string expect_k [8] = '{"0100", "1000", "1110", "0101", "0100", "0100", "1111", "1000"};

  function automatic logic [N-1:0] vec(string s);
    logic [N-1:0] v;
    for (int j = 0; j < N; j++) v[j] = (s[j] == "1");
    return v;
  endfunction

  logic [N-1:0] exp_q [$];
  int cyc = 0, last_sck = -1, nsck = 0;

  // Scoreboard: every shift must present the next expected slice.
  logic [N-1:0] e;
  always @(posedge clk) if (rst_n) begin
    if (sck_en) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL extra shift"); end
      else begin
        e = exp_q.pop_front();
        if (k !== e) begin failures++; $display("FAIL slice %0d k=%b exp=%b", nsck, k, e); end
      end
      nsck++;
      last_sck = cyc;
    end
    cyc++;
  end

  // Reference encoder for one slice: returns the word list.
  function automatic void encode(logic [N-1:0] s, ref logic [M-1:0] q [$]);
    int ones = $countones(s);
    bit b = (ones * 2 > N);
    int n = b ? N - ones : ones;
    q.push_back({b, (M-1)'(n)});
    for (int j = 0; j < N; j++) if (s[j] != b) q.push_back(M'(j + 1));
  endfunction

  initial begin
    logic [M-1:0] wq [$];
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    foreach (expect_k[i]) exp_q.push_back(vec(expect_k[i]));
    cyc = 0;
    for (int i = 0; i < 16; i++) begin
      tvalid = 1; tdata = words[i];
      @(negedge clk);
    end
    tvalid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (nsck != 8 || last_sck != 16) begin
      failures++; $display("FAIL timing: %0d shifts, last at cycle %0d (exp 8, 16)", nsck, last_sck);
    end
    // Random slices with pauses.
    for (int s = 0; s < 300; s++) begin
      logic [N-1:0] sl = N'($urandom);
      exp_q.push_back(sl);
      wq.delete();
      encode(sl, wq);
      foreach (wq[w]) begin
        while ($urandom_range(0, 4) == 0) begin tvalid = 0; @(negedge clk); end
        tvalid = 1; tdata = wq[w];
        @(negedge clk);
      end
    end
    tvalid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || nsck != 308) begin
      failures++; $display("FAIL %0d slices left, %0d shifts", exp_q.size(), nsck);
    end
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
