// ps_reset: reset block between the processing system and the PL.
//
// The PS reset (ext_reset_n, active low, asynchronous to the PL clock) is
// asserted into the PL at once and released synchronously after it has
// passed a SYNC_STAGES flip-flop chain, so all PL flip-flops leave reset on
// the same clock edge. Two resets are produced: interconnect_aresetn for the
// register block, and peripheral_aresetn for the NN datapath, which is also
// held in reset while the software reset request soft_reset is high (a
// register bit), so the NN can be cleared without losing the register
// contents or the loaded parameters. Both outputs are active low.
// That a reset block drives the PL resets from the PS follows the source
// design; the synchronizer depth and the soft reset are this design's choice.
module ps_reset #(
  parameter int unsigned SYNC_STAGES = 3
) (
  input  logic clk,
  input  logic ext_reset_n,
  input  logic soft_reset,
  output logic interconnect_aresetn,
  output logic peripheral_aresetn
);
  logic [SYNC_STAGES-1:0] sync;
  logic                   periph_q;

  always_ff @(posedge clk or negedge ext_reset_n) begin
    if (!ext_reset_n) sync <= '0;
    else              sync <= {sync[SYNC_STAGES-2:0], 1'b1};
  end

  always_ff @(posedge clk or negedge ext_reset_n) begin
    if (!ext_reset_n) periph_q <= 1'b0;
    else              periph_q <= sync[SYNC_STAGES-1] && !soft_reset;
  end

  assign interconnect_aresetn = sync[SYNC_STAGES-1];
  assign peripheral_aresetn   = periph_q;
endmodule
