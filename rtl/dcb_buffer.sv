// dcb_buffer: the buffer of a discriminator-coincidence-buffer (DCB) unit,
// 24 channels, with its gated readout.
//
// The discriminators and coincidence circuits are fast analogue
// electronics and sit outside this block; it receives their 24 logic
// outputs (`hit`). While MASTER GATE is open, any hit sets its channel's
// flip-flop, and the flip-flop holds until RESET (the front-panel reset or
// the interface's reset after a readout). The readout word is `q`; the unit
// reports ready once the master gate has closed. The 24 channels, the
// master gate and the reset come from the document; latching while the
// gate is open and the ready rule are this design's choices. Timing: a hit
// shows in `q` one clock after it is seen.
module dcb_buffer
  import sds_if_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  word_t hit,
  input  logic  master_gate,
  input  logic  reset,
  output word_t q,
  output logic  ready
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           q <= '0;
    else if (reset)       q <= '0;
    else if (master_gate) q <= q | hit;
  end

  assign ready = !master_gate;

endmodule
