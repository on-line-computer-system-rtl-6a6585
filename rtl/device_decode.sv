// device_decode: the DEVICE DECODE block that sits with each local
// multiplexer. Five device lines select one of up to 32 devices of a
// group, but only while that group's line (G1..G16) is raised; otherwise
// every select is low. N selects are produced (N <= 32); a device number at
// or above N selects nothing. Combinational.
module device_decode
  import sds_if_pkg::*;
#(
  parameter int N = N_DEV
) (
  input  logic             group_en,
  input  logic [DEV_W-1:0] dev_addr,
  output logic [N-1:0]     dev_sel
);

  always_comb begin
    dev_sel = '0;
    for (int i = 0; i < N; i++)
      if (group_en && dev_addr == DEV_W'(i)) dev_sel[i] = 1'b1;
  end

endmodule
