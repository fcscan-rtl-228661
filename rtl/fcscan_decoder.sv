// fcscan_decoder -- the log2(N)-to-N decoder of the FCSCAN decompressor.
//
// Turns the position carried by a configuration vector into the one-hot
// flip mask "conf" that drives the XOR gates of the flip configuration
// network.  Positions are 1-based: code p (1 <= p <= N_OUT) sets bit p-1
// (output k_p / chain c_p); code 0, codes above N_OUT and en = 0 give an
// all-zero mask.  Purely combinational.
//
// The decoder and its 1-based position code follow the published technique
// (a configuration vector 0010 flips the second chain); gating the mask
// with en (the configuration mode) is a choice of this implementation.
module fcscan_decoder #(
  parameter int unsigned N_OUT = 4,                  // decoder outputs
  parameter int unsigned W     = $clog2(N_OUT + 1)   // code width (channels)
) (
  input  logic [W-1:0]     code,
  input  logic             en,
  output logic [N_OUT-1:0] conf
);

  always_comb begin
    for (int unsigned i = 0; i < N_OUT; i++)
      conf[i] = en && (code == W'(i + 1));
  end

endmodule
