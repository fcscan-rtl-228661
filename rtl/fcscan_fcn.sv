// fcscan_fcn -- flip configuration network of the FCSCAN decompressor.
//
// For each output j there is one 2:1 multiplexer, one XOR gate and the first
// scan cell q[j] (clocked by cck).  The multiplexer is steered by the mode
// select ms:
//   ms = broadcast     : q[j] <= init_bit            (every cell gets the
//                                                     initial value)
//   ms = configuration : q[j] <= q[j] ^ conf[j]      (the cell fed back
//                                                     through the XOR is
//                                                     inverted where the
//                                                     decoder mask is 1)
// The cells only change in cycles with cck_en high.  After the initial
// vector and all configuration vectors of a slice, q holds the fully
// specified slice, which the sck shift then moves on into the scan chains.
//
// Structure (one MUX and one XOR per output, feedback from the first cell)
// follows the published architecture; the single-clock enable in place of a
// gated cck and the synchronous reset to 0 are choices of this design.
module fcscan_fcn
  import fcscan_pkg::*;
#(
  parameter int unsigned N_OUT = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cck_en,
  input  mode_e            ms,
  input  logic             init_bit,
  input  logic [N_OUT-1:0] conf,
  output logic [N_OUT-1:0] q
);

  logic [N_OUT-1:0] d;

  always_comb begin
    for (int unsigned j = 0; j < N_OUT; j++)
      d[j] = (ms == MS_CONFIG) ? (q[j] ^ conf[j]) : init_bit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      q <= '0;
    else if (cck_en) q <= d;
  end

endmodule
