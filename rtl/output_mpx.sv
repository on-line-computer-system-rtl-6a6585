// output_mpx: the multiplexer of the output devices, with its DEVICE
// DECODE. The POT BUFFER lines fan out to every output device; the
// multiplexer raises the load line of the one device that the decoder
// selects, for the clock in which the interface strobes the output. The
// group line enables the decoder. N devices, N <= 32. Combinational.
module output_mpx
  import sds_if_pkg::*;
#(
  parameter int N = N_DEV
) (
  input  logic             group_en,
  input  logic [DEV_W-1:0] dev_addr,
  input  logic             strobe,
  output logic [N-1:0]     dev_sel,
  output logic [N-1:0]     dev_load
);

  device_decode #(.N(N)) u_dec (
    .group_en (group_en),
    .dev_addr (dev_addr),
    .dev_sel  (dev_sel)
  );

  assign dev_load = strobe ? dev_sel : '0;

endmodule
