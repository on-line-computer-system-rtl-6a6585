// group_decode: the standard sub-decoding block. It splits its nine address
// lines into 4 + 5: the 4 upper lines select one of 16 GROUP DECODE lines
// (G1..G16), the 5 lower lines go on as the device address used by the
// DEVICE DECODE of every group. Group lines are raised only while the
// division decoder enables this block. The 4 + 5 split and the 16 groups
// follow the document; taking the upper four bits as the group number is
// this design's choice. Combinational.
module group_decode
  import sds_if_pkg::*;
(
  input  logic                enable,
  input  logic [ADDR_W-1:0]   addr,
  output logic [N_GROUP-1:0]  group_sel,
  output logic [DEV_W-1:0]    dev_addr
);

  assign dev_addr = addr[DEV_W-1:0];

  always_comb begin
    group_sel = '0;
    if (enable) group_sel[addr[ADDR_W-1 -: GROUP_W]] = 1'b1;
  end

endmodule
