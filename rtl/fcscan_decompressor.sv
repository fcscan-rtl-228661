// fcscan_decompressor -- the FCSCAN decompressor: DCU + decoder + flip
// configuration network.
//
// Takes the compressed stream from M tester channels and produces one fully
// specified N_OUT-bit scan slice k per slice period.  A slice is coded as
// an initial vector (broadcast value + number n of coded bits) followed by
// n configuration vectors (1-based positions of the bits to invert), one
// word per cycle.  The initial vector fills every output with the broadcast
// value (broadcast mode, ms = 0); each configuration vector inverts one
// output (configuration mode, ms = 1).  The cycle after the slice is
// complete, sck_en is high and k is valid for the scan chains to take; the
// next initial vector may be loaded in that same cycle.
//
// Timing: 1 + n cycles per slice, one tester word per cycle.  capture holds
// the decompressor for one cycle while the circuit under test captures.
module fcscan_decompressor
  import fcscan_pkg::*;
#(
  parameter int unsigned N_OUT = EX_N_CL,
  parameter int unsigned M     = chan_width(N_OUT)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tvalid,
  input  logic [M-1:0]     tdata,
  input  logic             capture,
  output logic [N_OUT-1:0] k,        // decompressed slice (decompressor outputs)
  output logic             sck_en,   // shift k into the scan chains
  output mode_e            ms,
  output logic             cck_en
);

  logic         init_bit;
  logic [M-1:0] conf_code;
  logic [N_OUT-1:0] conf;

  fcscan_dcu #(.M(M)) u_dcu (
    .clk, .rst_n, .tvalid, .tdata, .capture,
    .ms, .cck_en, .sck_en, .init_bit, .conf_code
  );

  fcscan_decoder #(.N_OUT(N_OUT), .W(M)) u_decoder (
    .code(conf_code), .en(ms == MS_CONFIG), .conf
  );

  fcscan_fcn #(.N_OUT(N_OUT)) u_fcn (
    .clk, .rst_n, .cck_en, .ms, .init_bit, .conf, .q(k)
  );

  // A configuration vector must name an existing output.
  a_conf_in_range : assert property (
    @(posedge clk) disable iff (!rst_n)
      (cck_en && ms == MS_CONFIG) |-> (conf_code != '0 && 32'(conf_code) <= N_OUT))
    else $error("fcscan_decompressor: configuration vector %0d out of range", conf_code);

  // The count field of an initial vector needs M-1 bits for up to half the outputs.
  if (M < 2 || (1 << M) <= N_OUT) begin : g_bad_m
    $error("fcscan_decompressor: M=%0d too small for %0d outputs", M, N_OUT);
  end

endmodule
