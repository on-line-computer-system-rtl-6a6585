// sense_encode: the sense-line ENCODE block. The computer's skip-on-sense
// instruction names one of 32 sense lines (`sel`); the block returns that
// line's state as `sense`, on which the instruction skips. Combinational.
module sense_encode
  import sds_if_pkg::*;
(
  input  logic [N_SENSE-1:0] lines,
  input  logic [4:0]         sel,
  output logic               sense
);

  assign sense = lines[sel];

endmodule
