// pot_buffer: the 24 POT BUFFER flip-flops between the computer's parallel
// output lines and the output devices.
//
// A POT instruction (`pot_wr`, one clock) loads the buffer either directly
// with the computer's word or, when `convert` is set, with that word after
// the binary-to-BCD converter (`bcd_in`, computed outside from `cpu_data`).
// In manual mode the computer is ignored and the operator sets or clears
// bits (reset wins); `q` drives the panel indicators and the output lines.
// Timing: `q` changes one clock after `pot_wr`.
module pot_buffer
  import sds_if_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  manual_mode,
  input  logic  pot_wr,
  input  word_t cpu_data,
  input  logic  convert,
  input  word_t bcd_in,
  input  word_t manual_set,
  input  word_t manual_reset,
  output word_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           q <= '0;
    else if (manual_mode) q <= (q | manual_set) & ~manual_reset;
    else if (pot_wr)      q <= convert ? bcd_in : cpu_data;
  end

endmodule
