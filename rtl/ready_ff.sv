// ready_ff: the READY FF of the input side. A ready test (an EOM whose op
// code asks for it) samples the DEVICE READY line of the selected device
// into this flip-flop; the flip-flop drives a sense line, so the program
// can test it later with a skip-on-sense instruction. The flip-flop is
// cleared by reset and by a `clear` pulse (a data capture, so that a stale
// result is not mistaken for a new one). Timing: `ready_q` changes one
// clock after `sample` or `clear`; `sample` wins if both are raised.
module ready_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic sample,
  input  logic clear,
  input  logic device_ready,
  output logic ready_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ready_q <= 1'b0;
    else if (sample) ready_q <= device_ready;
    else if (clear)  ready_q <= 1'b0;
  end

endmodule
