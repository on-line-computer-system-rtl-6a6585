// bin_to_bcd: the binary-to-BCD converter on the output side. A 24-bit
// binary word becomes six BCD digits, least significant in bits 3:0. Six
// digits hold at most 999 999, less than the largest 24-bit value, so
// `overflow` is raised when the value does not fit and the digits then hold
// the value modulo 10^6. Combinational shift-and-add-3 (double dabble) over
// eight digits, of which the upper two only feed `overflow`.
module bin_to_bcd
  import sds_if_pkg::*;
(
  input  word_t bin,
  output word_t bcd,
  output logic  overflow
);

  localparam int FULL_DIGITS = 8;  // enough for 16 777 215

  logic [4*FULL_DIGITS-1:0] acc;

  always_comb begin
    acc = '0;
    for (int i = WORD_W - 1; i >= 0; i--) begin
      for (int d = 0; d < FULL_DIGITS; d++)
        if (acc[4*d +: 4] >= 4'd5) acc[4*d +: 4] = acc[4*d +: 4] + 4'd3;
      acc = {acc[4*FULL_DIGITS-2:0], bin[i]};
    end
  end

  assign bcd      = acc[WORD_W-1:0];
  assign overflow = |acc[4*FULL_DIGITS-1:WORD_W];

endmodule
