// fcscan_top -- improved FCSCAN test-input decompression for a multi-scan
// circuit under test.
//
//   tester (M channels) -> fcscan_decompressor (N_CL outputs k)
//                       -> fcscan_fanout (inverter fan-out to N_SC chains)
//                       -> fcscan_scan_chains (N_SC x SCAN_LEN cells)
//                       -> fcscan_misr (signature of the scan outputs)
//
// Each scan slice costs 1 + n tester words (n = coded bits of the slice);
// the slice is shifted into all chains at once (sck_en) in the cycle after
// its last word, and the scan outputs are compacted in the MISR on the same
// shift.  Between patterns the tester raises capture for one cycle (and
// sends no word): the chains load the response cap_d of the CUT logic,
// which is not part of this design and is connected through scan_q / cap_d.
// The scan chains' previous content leaves through the MISR while the next
// pattern is shifted in.
//
// Defaults: the ten-chain example of the published technique (10 chains,
// 4 clusters, 3 channels, 8 slices per pattern, inverters on c7, c9 and k2).
// For another circuit the cluster map and inverters come from offline
// clustering of its test set and are passed as parameters.
module fcscan_top
  import fcscan_pkg::*;
#(
  parameter int unsigned N_SC     = EX_N_SC,
  parameter int unsigned N_CL     = EX_N_CL,
  parameter int unsigned SCAN_LEN = EX_SCAN_LEN,
  parameter int unsigned M        = chan_width(N_CL),
  parameter int unsigned CLUSTER_OF [N_SC] = EX_CLUSTER_OF,
  parameter logic [N_CL-1:0] CLUSTER_INV = EX_CLUSTER_INV,
  parameter logic [N_SC-1:0] CHAIN_INV   = EX_CHAIN_INV,
  parameter logic [N_SC-1:0] MISR_POLY   = EX_MISR_POLY
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // tester side
  input  logic                          tvalid,
  input  logic [M-1:0]                  tdata,
  input  logic                          capture,
  input  logic                          misr_clear,
  output logic [N_SC-1:0]               misr_sig,
  // circuit-under-test logic side
  output logic [N_SC-1:0][SCAN_LEN-1:0] scan_q,
  input  logic [N_SC-1:0][SCAN_LEN-1:0] cap_d,
  // status
  output mode_e                         ms,
  output logic                          cck_en,
  output logic                          sck_en
);

  logic [N_CL-1:0] k;
  logic [N_SC-1:0] si, so;

  fcscan_decompressor #(.N_OUT(N_CL), .M(M)) u_decomp (
    .clk, .rst_n, .tvalid, .tdata, .capture, .k, .sck_en, .ms, .cck_en
  );

  fcscan_fanout #(
    .N_CL(N_CL), .N_SC(N_SC), .CLUSTER_OF(CLUSTER_OF),
    .CLUSTER_INV(CLUSTER_INV), .CHAIN_INV(CHAIN_INV)
  ) u_fanout (
    .k, .si
  );

  fcscan_scan_chains #(.N_SC(N_SC), .LEN(SCAN_LEN)) u_chains (
    .clk, .rst_n, .sck_en, .capture, .si, .cap_d, .q(scan_q), .so
  );

  fcscan_misr #(.W(N_SC), .POLY(MISR_POLY)) u_misr (
    .clk, .rst_n, .clear(misr_clear), .en(sck_en && !capture), .d(so), .sig(misr_sig)
  );

endmodule
