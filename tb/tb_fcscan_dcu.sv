// tb_fcscan_dcu -- self-check of the decompression control unit with the
// four-channel stream of the basic ten-chain example (18 words, 8 slices):
// ms must follow the word type, cck must follow every word, and sck must
// come exactly once per slice, in the cycle after its last word, so that the
// slices end after 1+n words each.  Then a tester pause inside a slice and a
// capture cycle that holds a pending shift are checked.
module tb_fcscan_dcu;
  import fcscan_pkg::*;
  localparam int M = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, tvalid = 0, capture = 0;
  logic [M-1:0] tdata = '0;
  mode_e ms;
  logic cck_en, sck_en, init_bit;
  logic [M-1:0] conf_code;

  fcscan_dcu #(.M(M)) dut (.clk, .rst_n, .tvalid, .tdata, .capture,
                           .ms, .cck_en, .sck_en, .init_bit, .conf_code);

  always #5 clk = ~clk;

  // Compressed stream of the basic example, one word per cycle.
  logic [M-1:0] words [18] = '{4'b0001, 4'b0100,
                               4'b1011, 4'b0010, 4'b0100, 4'b0101,
                               4'b1001, 4'b0011,
                               4'b1011, 4'b0001, 4'b0010, 4'b1001,
                               4'b1001, 4'b0010,
                               4'b0000,
                               4'b1000,
                               4'b1001, 4'b0100};
  // Word type: 0 = initial vector, 1 = configuration vector.
  bit is_conf [18] = '{0,1, 0,1,1,1, 0,1, 0,1,1,1, 0,1, 0, 0, 0,1};
  // Cycles (counted from the first word) with an sck shift.
  int sck_cycles [8] = '{2, 6, 8, 12, 14, 15, 16, 18};

  int cyc = 0, sck_seen = 0, sck_idx = 0;

  function automatic void chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", cyc, what); end
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // Stream phase: cycles 0..19.
    for (cyc = 0; cyc < 20; cyc++) begin
      tvalid = (cyc < 18);
      tdata  = (cyc < 18) ? words[cyc] : '0;
      #1;
      if (cyc < 18) begin
        chk(cck_en == 1'b1, "cck missing");
        chk(ms == (is_conf[cyc] ? MS_CONFIG : MS_BROADCAST), "ms wrong");
        if (!is_conf[cyc]) chk(init_bit == words[cyc][M-1], "init bit");
        else               chk(conf_code == words[cyc], "conf code");
      end else begin
        chk(cck_en == 1'b0, "cck without word");
      end
      if (sck_idx < 8 && cyc == sck_cycles[sck_idx]) begin
        chk(sck_en == 1'b1, "sck missing");
        sck_idx++;
      end else begin
        chk(sck_en == 1'b0, "unexpected sck");
      end
      if (sck_en) sck_seen++;
      @(negedge clk);
    end
    chk(sck_seen == 8, "eight shifts for eight slices");

    // Pause inside a slice: init 1010 (2 coded bits), gap, two confs.
    tvalid = 1; tdata = 4'b1010; @(negedge clk);
    tvalid = 0; #1; chk(ms == MS_CONFIG && !sck_en && !cck_en, "pause holds");
    @(negedge clk);
    tvalid = 1; tdata = 4'b0011; #1; chk(ms == MS_CONFIG, "conf after pause");
    @(negedge clk);
    tdata = 4'b0100; #1; chk(ms == MS_CONFIG && !sck_en, "second conf");
    @(negedge clk);
    // Next initial vector (n = 0) arrives with the pending shift.
    tdata = 4'b0000; #1; chk(sck_en && ms == MS_BROADCAST, "shift with next init");
    @(negedge clk);
    // Capture cycle: the slice completed by 0000 must wait.
    tvalid = 0; capture = 1; #1; chk(!sck_en && !cck_en, "capture holds sck");
    @(negedge clk);
    capture = 0; #1; chk(sck_en, "held shift after capture");
    @(negedge clk);
    #1; chk(!sck_en, "single shift");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
