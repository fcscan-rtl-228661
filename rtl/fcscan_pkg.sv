// fcscan_pkg -- shared types, constants and helper functions of the FCSCAN
// fan-out compression scan decompressor.
//
// Bit order used throughout the RTL: bit 0 of a chain or cluster vector is
// chain c1 / scan input k1, bit i is c(i+1) / k(i+1).  Printed slice strings
// such as "0100000000" (leftmost = c1) therefore appear bit-reversed when a
// packed vector is printed with %b.
//
// The EX_* constants are the ten-chain, four-cluster configuration that is
// worked through as the running example of the technique (ten scan chains,
// eight slices, clusters k1={c1,c6}, k2={c4,c8,c9,c10}, k3={c2,c7},
// k4={c3,c5}, inverters on c7 and c9 and on the scan input k2).  They are
// the default parameters of the top level.
package fcscan_pkg;

  // Mode select ms driven by the DCU into the flip configuration network.
  typedef enum logic {
    MS_BROADCAST = 1'b0,  // all outputs take the initial value
    MS_CONFIG    = 1'b1   // the decoded output is inverted in place
  } mode_e;

  // Number of tester channels M for a decompressor driving n_out outputs.
  // Configuration vectors are 1-based positions (1..n_out, 0 selects no
  // output), so M = ceil(log2(n_out + 1)).
  function automatic int unsigned chan_width(input int unsigned n_out);
    return $clog2(n_out + 1);
  endfunction

  // Running-example configuration.
  localparam int unsigned EX_N_SC     = 10;  // internal scan chains
  localparam int unsigned EX_N_CL     = 4;   // scan clusters (decompressor outputs)
  localparam int unsigned EX_SCAN_LEN = 8;   // scan slices per pattern

  typedef int unsigned ex_map_t [EX_N_SC];

  // Cluster index (0-based, k1 = 0) feeding each chain c1..c10.
  localparam ex_map_t EX_CLUSTER_OF = '{0, 2, 3, 1, 3, 0, 2, 1, 1, 1};
  // Inverter in front of a single chain: c7 (bit 6) and c9 (bit 8).
  localparam logic [EX_N_SC-1:0] EX_CHAIN_INV   = 10'b01_0100_0000;
  // Inverter between the decompressor and the fan-out of a cluster: k2.
  localparam logic [EX_N_CL-1:0] EX_CLUSTER_INV = 4'b0010;

  // MISR feedback polynomial for a 10-bit register: x^10 + x^3 + 1
  // (primitive), lower coefficients only.
  localparam logic [EX_N_SC-1:0] EX_MISR_POLY = 10'h009;

endpackage
