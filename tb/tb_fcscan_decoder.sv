// tb_fcscan_decoder -- exhaustive self-check of the 1-based position decoder
// for the four-output, 3-bit configuration (improved example) and the
// ten-output, 4-bit configuration (basic example, where code 0010 must give
// the mask with only chain c2 set).
module tb_fcscan_decoder;
  int checks = 0, failures = 0;

  logic [2:0] code4;  logic en4;  logic [3:0] conf4;
  logic [3:0] code10; logic en10; logic [9:0] conf10;

  fcscan_decoder #(.N_OUT(4))            dut4  (.code(code4),  .en(en4),  .conf(conf4));
  fcscan_decoder #(.N_OUT(10), .W(4))    dut10 (.code(code10), .en(en10), .conf(conf10));

  function automatic logic [15:0] ref_mask(int code, int n, bit en);
    logic [15:0] m = '0;
    if (en && code >= 1 && code <= n) m[code-1] = 1'b1;
    return m;
  endfunction

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int c = 0; c < 8; c++) begin
        code4 = 3'(c); en4 = e[0]; #1;
        checks++;
        if (conf4 !== ref_mask(c, 4, e[0]) [3:0]) begin
          failures++; $display("FAIL n=4 code=%0d en=%0d conf=%b", c, e, conf4);
        end
      end
      for (int c = 0; c < 16; c++) begin
        code10 = 4'(c); en10 = e[0]; #1;
        checks++;
        if (conf10 !== ref_mask(c, 10, e[0]) [9:0]) begin
          failures++; $display("FAIL n=10 code=%0d en=%0d conf=%b", c, e, conf10);
        end
      end
    end
    // Example from the text: vector 0010 -> conf "0100000000" (c1 leftmost).
    code10 = 4'b0010; en10 = 1'b1; #1;
    checks++;
    if (conf10 !== 10'b00_0000_0010) begin failures++; $display("FAIL example mask %b", conf10); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
