// interval_timer: a SET INTERVAL TIMER among the output devices.
//
// The computer loads an interval (`load` with `interval`, a binary count);
// the timer then counts rising edges of its CLOCK IN line and, when that
// many have arrived, gives a one-clock COMPLETION PULSE OUT (`completion`)
// and stops. Loading zero stops the timer without a pulse; loading while it
// runs restarts it. The clock input, the completion pulse and the loading
// from the computer come from the document; binary counting and the
// restart rule are this design's choices. `running` is high while it
// counts. Timing: the completion pulse comes one clock after the edge that
// ends the interval is seen.
module interval_timer
  import sds_if_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load,
  input  word_t interval,
  input  logic  clock_in,
  output word_t remaining,
  output logic  running,
  output logic  completion
);

  logic clock_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining  <= '0;
      clock_q    <= 1'b0;
      completion <= 1'b0;
    end else begin
      clock_q    <= clock_in;
      completion <= 1'b0;
      if (load) remaining <= interval;
      else if (clock_in && !clock_q && remaining != '0) begin
        remaining <= remaining - 1'b1;
        if (remaining == WORD_W'(1)) completion <= 1'b1;
      end
    end
  end

  assign running = (remaining != '0);

endmodule
