// fcscan_dcu -- decompression control unit of the FCSCAN decompressor.
//
// The tester delivers one M-bit word per clock (tvalid).  Each scan slice is
// sent as an initial vector followed by as many configuration vectors as the
// slice has coded bits:
//   initial vector       : tdata[M-1]   = value broadcast to every output
//                          tdata[M-2:0] = n, number of configuration vectors
//   configuration vector : tdata        = 1-based position of the output to
//                                         invert
// The DCU is a small FSM around a down-counter cnt.  While cnt == 0 the next
// word is an initial vector: ms = broadcast, and cnt is loaded with n.  While
// cnt != 0 the word is a configuration vector: ms = configuration, the word
// is handed to the decoder as conf_code and cnt counts down.  Every accepted
// word produces one cck pulse (cck_en) that clocks the flip configuration
// network.  The cycle after the word that completes a slice, sck_en is high
// and the finished slice is shifted into the scan chains; in that same cycle
// the next initial vector may already be loaded.  A slice with n coded bits
// therefore costs exactly 1 + n tester cycles.
//
// The word format, the counter and the cck/sck/ms roles follow the
// published technique.  Design choices of this implementation: cck and sck
// are clock enables on a single clock rather than gated clocks; tvalid lets
// the tester pause; capture freezes the DCU for the cycle in which the
// circuit under test captures its response (the tester must not send a
// word then), so a pending shift waits until the capture is over;
// reset is synchronous and active low.
module fcscan_dcu
  import fcscan_pkg::*;
#(
  parameter int unsigned M = 3   // tester channels (word width), >= 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tvalid,     // tester word present
  input  logic [M-1:0] tdata,      // tester word
  input  logic         capture,    // CUT capture cycle: hold everything
  output mode_e        ms,         // mode select to the FCN
  output logic         cck_en,     // clock enable of the FCN cells
  output logic         sck_en,     // clock enable of the scan chains
  output logic         init_bit,   // broadcast value of an initial vector
  output logic [M-1:0] conf_code   // position field of a configuration vector
);

  logic [M-2:0] cnt_q, cnt_d;
  logic         pending_q, pending_d;  // a finished slice waits for sck

  assign ms        = (cnt_q != '0) ? MS_CONFIG : MS_BROADCAST;
  assign cck_en    = tvalid && !capture;
  assign sck_en    = pending_q && !capture;
  assign init_bit  = tdata[M-1];
  assign conf_code = tdata;

  always_comb begin
    cnt_d     = cnt_q;
    pending_d = pending_q && capture;   // cleared by its shift
    if (cck_en) begin
      if (ms == MS_BROADCAST) begin
        cnt_d     = tdata[M-2:0];
        pending_d = (tdata[M-2:0] == '0);
      end else begin
        cnt_d     = cnt_q - 1'b1;
        pending_d = (cnt_q == 1);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      pending_q <= 1'b0;
    end else begin
      cnt_q     <= cnt_d;
      pending_q <= pending_d;
    end
  end

  // The tester may not send a word in a capture cycle.
  a_no_word_in_capture : assert property (
    @(posedge clk) disable iff (!rst_n) capture |-> !tvalid)
    else $error("fcscan_dcu: tester word sent during capture");

endmodule
