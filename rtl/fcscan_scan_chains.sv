// fcscan_scan_chains -- the internal scan chains of the circuit under test.
//
// N_SC chains of LEN mux-D scan cells.  Cell [i][0] sits at the scan input of
// chain i, cell [i][LEN-1] at its scan output so[i].  With sck_en high every
// chain shifts one place towards its output and takes si[i] into cell 0;
// with capture high every cell loads the CUT response cap_d instead
// (capture wins).  q exposes all cells to the CUT logic.
//
// Synchronous, one clock: sck is modelled as a clock enable.  The chains
// belong to the circuit under test; their capture port and the reset to 0
// are choices of this model, the shift-on-sck behaviour follows the
// published architecture.
module fcscan_scan_chains #(
  parameter int unsigned N_SC = 10,
  parameter int unsigned LEN  = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      sck_en,
  input  logic                      capture,
  input  logic [N_SC-1:0]           si,
  input  logic [N_SC-1:0][LEN-1:0]  cap_d,
  output logic [N_SC-1:0][LEN-1:0]  q,
  output logic [N_SC-1:0]           so
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q <= '0;
    end else if (capture) begin
      q <= cap_d;
    end else if (sck_en) begin
      for (int unsigned i = 0; i < N_SC; i++)
        q[i] <= LEN'({q[i], si[i]});
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N_SC; i++)
      so[i] = q[i][LEN-1];
  end

endmodule
