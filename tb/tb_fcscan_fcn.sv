// tb_fcscan_fcn -- self-check of the flip configuration network: a directed
// run of the slice s2 of the basic example (broadcast 1, then invert c2, c4
// and c5 -> 1010011111 with c1 leftmost) followed by 2000 random cycles
// against a bit-level reference model.
module tb_fcscan_fcn;
  import fcscan_pkg::*;
  localparam int N = 10;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, cck_en = 0, init_bit = 0;
  mode_e ms = MS_BROADCAST;
  logic [N-1:0] conf = '0, q, model;

  fcscan_fcn #(.N_OUT(N)) dut (.clk, .rst_n, .cck_en, .ms, .init_bit, .conf, .q);

  always #5 clk = ~clk;

  task automatic step(bit en, mode_e m, bit ib, logic [N-1:0] c);
    @(negedge clk);
    cck_en = en; ms = m; init_bit = ib; conf = c;
    @(posedge clk);
    if (rst_n && en) begin
      for (int j = 0; j < N; j++)
        model[j] = (m == MS_CONFIG) ? (model[j] ^ c[j]) : ib;
    end
    #1;
    checks++;
    if (q !== model) begin
      failures++; $display("FAIL q=%b model=%b", q, model);
    end
  endtask

  // string "c1..c10" -> vector with c1 in bit 0
  function automatic logic [N-1:0] slice(string s);
    logic [N-1:0] v;
    for (int j = 0; j < N; j++) v[j] = (s[j] == "1");
    return v;
  endfunction

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    step(1, MS_BROADCAST, 1, '0);
    step(1, MS_CONFIG, 0, slice("0100000000"));
    step(1, MS_CONFIG, 0, slice("0001000000"));
    step(1, MS_CONFIG, 0, slice("0000100000"));
    checks++;
    if (q !== slice("1010011111")) begin failures++; $display("FAIL s2 q=%b", q); end
    step(0, MS_CONFIG, 1, slice("1111111111"));   // no cck: hold
    checks++;
    if (q !== slice("1010011111")) begin failures++; $display("FAIL hold q=%b", q); end
    for (int i = 0; i < 2000; i++)
      step(1'($urandom_range(0, 3) != 0), mode_e'($urandom_range(0, 1)), 1'($urandom),
           N'(1 << $urandom_range(0, N)));
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
