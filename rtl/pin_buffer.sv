// pin_buffer: the 24 PIN BUFFER flip-flops between the input bus and the
// computer's parallel input lines.
//
// `capture` (one clock) loads the buffer from the bus data lines. The
// computer reads it either directly or through the BCD-to-binary
// converter: `convert` picks the converter's result (`bin_in`, computed
// outside from `q`) for `cpu_data`. In manual mode captures are ignored and
// the operator sets or clears bits from the control panel (reset wins);
// `q` also drives the panel indicators. Timing: `q` changes one clock after
// capture; `cpu_data` follows `q` and `convert` combinationally.
module pin_buffer
  import sds_if_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  manual_mode,
  input  logic  capture,
  input  word_t bus_data,
  input  word_t manual_set,
  input  word_t manual_reset,
  input  logic  convert,
  input  word_t bin_in,
  output word_t q,
  output word_t cpu_data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           q <= '0;
    else if (manual_mode) q <= (q | manual_set) & ~manual_reset;
    else if (capture)     q <= bus_data;
  end

  assign cpu_data = convert ? bin_in : q;

endmodule
