// flag_register: a bank of 24 flag flip-flops read as one word.
//
// A high level on a set input sets its flag; the flag stays set until
// RESET (front panel, or the interface after a readout). `any_set` is
// raised while any flag is set and serves as the bank's ready line and set
// signal. The 24 flags, their set inputs and the reset come from the
// document; `any_set` is this design's choice. Timing: a set shows in `q`
// one clock later; reset wins over a simultaneous set.
module flag_register
  import sds_if_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  word_t set,
  input  logic  reset,
  output word_t q,
  output logic  any_set
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (reset) q <= '0;
    else            q <= q | set;
  end

  assign any_set = |q;

endmodule
