// fcscan_misr -- multiple-input signature register for the scan outputs.
//
// Compacts the W scan-chain outputs d into a W-bit signature, one step per
// cycle with en high (each scan shift).  Galois form:
//   sig <= {sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : '0) ^ d
// where POLY holds the lower coefficients of the feedback polynomial
// (default x^10 + x^3 + 1).  clear resets the signature to 0.
//
// Response compaction in a MISR is assumed, not specified, by the published
// technique; the Galois structure, the polynomial and the clear input are
// choices of this design.
module fcscan_misr #(
  parameter int unsigned W    = 10,
  parameter logic [W-1:0] POLY = W'(10'h009)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);

  logic [W-1:0] nxt;

  always_comb begin
    nxt = {sig[W-2:0], 1'b0} ^ d;
    if (sig[W-1]) nxt = nxt ^ POLY;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) sig <= '0;
    else if (en)         sig <= nxt;
  end

endmodule
