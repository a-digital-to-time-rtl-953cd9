// dtc_decoder: control decoder of the 64-stage DTC.
//
// A code d selects stage i = N_STAGES-1-d as the point where FREF is fed
// into the delay line (ek one-hot at i). Only the delay elements from the
// feed-in stage to the output carry the edge, so eb[j] is set for j >= i
// and cleared for the stages ahead of the feed-in point, which are switched
// off to save power. The delay from FREF to FREF_DLY is then a fixed offset
// plus d unit delays. The code-to-stage mapping and the eb rule follow the
// design; the decoder itself is purely combinational, which is this
// implementation's choice.
`timescale 1ps/1fs
module dtc_decoder #(
  parameter int CTRL_W   = dtc_pkg::CTRL_W,
  parameter int N_STAGES = 2**CTRL_W
) (
  input  logic [CTRL_W-1:0]   dtc_ctrl,
  output logic [N_STAGES-1:0] ek,
  output logic [N_STAGES-1:0] eb
);
  logic [CTRL_W-1:0] feed;  // index of the feed-in stage
  assign feed = CTRL_W'(N_STAGES - 1) - dtc_ctrl;

  always_comb begin
    for (int j = 0; j < N_STAGES; j++) begin
      ek[j] = (j == int'(feed));
      eb[j] = (j >= int'(feed));
    end
  end

  // exactly one clock feeder may drive the line
  always_comb a_one_feed: assert ($onehot(ek));
endmodule
