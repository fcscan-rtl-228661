// fcscan_fanout -- single-level fan-out network with inverters.
//
// Connects the N_CL decompressor outputs (scan inputs k1..kN_CL, one per
// scan cluster) to the N_SC internal scan chains.  Chain i is driven by
// cluster CLUSTER_OF[i]; an inverter sits in front of the chain where
// CHAIN_INV[i] is set (inversely compatible chain), and an inverter sits
// between the decompressor and the whole cluster where CLUSTER_INV[c] is
// set (added to reduce the number of coded bits).  So
//   si[i] = k[CLUSTER_OF[i]] ^ CLUSTER_INV[CLUSTER_OF[i]] ^ CHAIN_INV[i].
// Purely combinational: only wires and inverters.
//
// The structure follows the published improved scheme; the defaults are its
// ten-chain example.  The map itself comes from an offline clustering of a
// test set and is given here as parameters.
module fcscan_fanout
  import fcscan_pkg::*;
#(
  parameter int unsigned N_CL = EX_N_CL,
  parameter int unsigned N_SC = EX_N_SC,
  parameter int unsigned CLUSTER_OF [N_SC] = EX_CLUSTER_OF,
  parameter logic [N_CL-1:0] CLUSTER_INV = EX_CLUSTER_INV,
  parameter logic [N_SC-1:0] CHAIN_INV   = EX_CHAIN_INV
) (
  input  logic [N_CL-1:0] k,
  output logic [N_SC-1:0] si
);

  for (genvar i = 0; i < N_SC; i++) begin : g_chain
    if (CLUSTER_OF[i] >= N_CL) begin : g_bad
      $error("fcscan_fanout: chain %0d mapped to missing cluster %0d", i, CLUSTER_OF[i]);
    end
    localparam int unsigned C = CLUSTER_OF[i];
    assign si[i] = k[C] ^ CLUSTER_INV[C] ^ CHAIN_INV[i];
  end

endmodule
