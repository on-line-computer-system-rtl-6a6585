// scaler: a fast gated scaler with multiplexed readout.
//
// Counts clocks on which `pulse_in` is high while GATE is open. It is 24
// bits wide, one computer word; on wrapping from all ones to zero it gives
// a one-clock OVERFLOW pulse, which the interrupt patch panel can take.
// RESET (front panel, or the interface after a readout) clears it. The
// scaler reports ready while the gate is closed. The document gives the
// gate, reset and overflow and a 100 Mc/s counting rate, which this design
// reaches with a 100 MHz or faster clock and one count per clock; width and
// ready rule are this design's choices. Timing: a counted pulse shows in
// `count` one clock later.
module scaler
  import sds_if_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  pulse_in,
  input  logic  gate,
  input  logic  reset,
  output word_t count,
  output logic  overflow,
  output logic  ready
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (reset) begin
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= gate && pulse_in && (&count);
      if (gate && pulse_in) count <= count + 1'b1;
    end
  end

  assign ready = !gate;

endmodule
