// nixie_display: a NIXIE DISPLAY output device of six decimal digits.
//
// A load from the output multiplexer stores the POT word, read as six BCD
// digits (least significant in bits 3:0), and the register drives one
// cathode line out of ten per tube. A digit code above 9 lights no cathode
// of its tube (blank). The document only names the nixie displays; the
// six-digit BCD format and the cathode decoding are this design's choices.
// Timing: the display changes one clock after `load`.
module nixie_display
  import sds_if_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  word_t       data,
  output word_t       shown,
  output logic [9:0]  cathode [BCD_DIGITS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    shown <= '0;
    else if (load) shown <= data;
  end

  always_comb
    for (int t = 0; t < BCD_DIGITS; t++) begin
      cathode[t] = '0;
      if (shown[4*t +: 4] <= 4'd9) cathode[t][shown[4*t +: 4]] = 1'b1;
    end

endmodule
