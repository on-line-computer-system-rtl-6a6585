// bcd_to_bin: the BCD-to-binary converter on the input side. The 24-bit
// word is read as six binary-coded decimal digits, least significant digit
// in bits 3:0, and converted to its binary value (at most 999 999, 20
// bits). Digit codes 10..15 are not checked: they are weighted like any
// other digit value, and `bad_digit` flags them. Combinational: the sum of
// each digit times its power of ten.
module bcd_to_bin
  import sds_if_pkg::*;
(
  input  word_t bcd,
  output word_t bin,
  output logic  bad_digit
);

  always_comb begin
    bin       = '0;
    bad_digit = 1'b0;
    for (int d = BCD_DIGITS - 1; d >= 0; d--) begin
      bin = bin * WORD_W'(10) + WORD_W'(bcd[4*d +: 4]);
      if (bcd[4*d +: 4] > 4'd9) bad_digit = 1'b1;
    end
  end

endmodule
