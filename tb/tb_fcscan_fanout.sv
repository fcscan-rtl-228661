// tb_fcscan_fanout -- self-check of the inverter fan-out network.
//  1. Default (ten-chain example, inverters on c7, c9 and k2): the
//     decompressor outputs of the worked example after coded-bit reduction
//     must reproduce every specified bit of the eight original test cubes.
//  2. Without the k2 inverter: the scan inputs of the clustering example
//     must give its fully specified slices (s1, s3, s4, s7, s8).
//  3. Both instances, all 16 input values, against the equation.
module tb_fcscan_fanout;
  import fcscan_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0] k, k_b;
  logic [9:0] si, si_b;

  fcscan_fanout dut (.k(k), .si(si));
  fcscan_fanout #(.CLUSTER_INV(4'b0000)) dut_b (.k(k_b), .si(si_b));

  // Original test cubes, c1..c10 left to right, X = don't care.
  string cubes [8] = '{"000100XXXX", "10X0011XXX", "1X01XXXXXX", "00111X1X0X",
                       "X0X1XX11X1", "0X0XX0XX0X", "X11XXXXXXX", "1XX0X11X1X"};
  // Decompressor outputs k1 k2' k3 k4 after coded-bit reduction.
  string kred  [8] = '{"0000", "1100", "1000", "0001", "0000", "0000", "1111", "1101"};
  // Scan inputs k1..k4 and the fully specified slices of the clustering
  // example for slices s1, s3, s4, s7 and s8.
  string kcl   [5] = '{"0100", "1110", "0101", "1111", "1000"};
  string fin   [5] = '{"0001001101", "1101010101", "0011101101", "1111110101", "1000011010"};

  function automatic logic [9:0] vec(string s, int n);
    logic [9:0] v = '0;
    for (int j = 0; j < n; j++) v[j] = (s[j] == "1");
    return v;
  endfunction

  initial begin
    for (int s = 0; s < 8; s++) begin
      k = vec(kred[s], 4); #1;
      for (int c = 0; c < 10; c++) begin
        if (cubes[s][c] != "X") begin
          checks++;
          if (si[c] !== (cubes[s][c] == "1")) begin
            failures++; $display("FAIL cube s%0d c%0d si=%b", s+1, c+1, si[c]);
          end
        end
      end
    end
    for (int s = 0; s < 5; s++) begin
      k_b = vec(kcl[s], 4); #1;
      checks++;
      if (si_b !== vec(fin[s], 10)) begin
        failures++; $display("FAIL clustered row %0d si=%b", s, si_b);
      end
    end
    for (int v = 0; v < 16; v++) begin
      k = 4'(v); k_b = 4'(v); #1;
      for (int c = 0; c < 10; c++) begin
        checks += 2;
        if (si[c] !== (k[EX_CLUSTER_OF[c]] ^ EX_CLUSTER_INV[EX_CLUSTER_OF[c]] ^ EX_CHAIN_INV[c])) begin
          failures++; $display("FAIL eq k=%b c%0d", k, c+1);
        end
        if (si_b[c] !== (k_b[EX_CLUSTER_OF[c]] ^ EX_CHAIN_INV[c])) begin
          failures++; $display("FAIL eq_b k=%b c%0d", k_b, c+1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
