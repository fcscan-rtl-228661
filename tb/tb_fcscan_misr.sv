// tb_fcscan_misr -- self-check of the 10-bit signature register.
//  1. Random inputs with random enable and clear, against polynomial
//     arithmetic: sig(x) <- x*sig(x) + d(x) mod (x^10 + x^3 + 1).
//  2. With zero input a register seeded with 1 must return to 1 after
//     exactly 1023 steps and not before (the polynomial is primitive).
module tb_fcscan_misr;
  localparam int W = 10;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [W-1:0] d = '0, sig;

  fcscan_misr dut (.clk, .rst_n, .clear, .en, .d, .sig);
  always #5 clk = ~clk;

  int unsigned model = 0;
  localparam int unsigned PX = (1 << 10) | (1 << 3) | 1;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      en = 1'($urandom_range(0, 3) != 0);
      clear = 1'($urandom_range(0, 99) == 0);
      d = W'($urandom);
      @(posedge clk);
      if (clear) model = 0;
      else if (en) begin
        model = (model << 1) ^ d;
        if (model & (1 << W)) model ^= PX;
      end
      #1;
      checks++;
      if (sig !== W'(model)) begin failures++; $display("FAIL t=%0d sig=%h model=%h", t, sig, model); end
      @(negedge clk);
    end
    // Period test.
    clear = 1; en = 0; @(negedge clk);
    clear = 0; en = 1; d = 10'h001; @(negedge clk);
    d = '0;
    begin
      int period = 0;
      for (int s = 1; s <= 1100; s++) begin
        @(negedge clk);
        if (sig == 10'h001) begin period = s; break; end
      end
      checks++;
      if (period != 1023) begin failures++; $display("FAIL period %0d", period); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
