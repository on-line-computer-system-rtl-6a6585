// division_decode: the DIVISION DECODE and its multiplexer, which channel
// the nine address lines of the EOM buffer to one of eight sub-decoding
// blocks.
//
// Three EOM lines choose the block; only the chosen block sees an enable,
// and the nine lines go to every block as a shared address (a block that is
// not enabled ignores them). Eight blocks of up to 2^9 selects each follow
// the document. Combinational.
module division_decode
  import sds_if_pkg::*;
(
  input  logic [DIV_W-1:0]  division,
  input  logic              valid,
  output logic [N_DIV-1:0]  div_en
);

  always_comb begin
    div_en = '0;
    if (valid) div_en[division] = 1'b1;
  end

endmodule
