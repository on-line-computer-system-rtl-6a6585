// input_mpx: a local input multiplexer with its DEVICE DECODE and line
// drivers, as placed near a cluster of devices in the counting house.
//
// When its group line is raised, the device decoder picks one of N devices
// from the 5 device lines, and that device's 24 data lines and DEVICE READY
// line are driven onto the common input bus. The interface's RESET pulse is
// routed to the selected device only. When the group line is low the
// drivers are off, which here means the multiplexer drives zeros: the
// buses of all multiplexers are ORed together at the PIN BUFFER, standing
// in for the shared cable (a choice of this design; the document does not
// say how the drivers share the bus). `dev_sel` is the device's select
// line, which gates its readout. Combinational.
module input_mpx
  import sds_if_pkg::*;
#(
  parameter int N = N_DEV
) (
  input  logic             group_en,
  input  logic [DEV_W-1:0] dev_addr,
  input  word_t            dev_data  [N],
  input  logic [N-1:0]     dev_ready,
  input  logic             reset_pulse,
  output logic [N-1:0]     dev_sel,
  output logic [N-1:0]     dev_reset,
  output in_bus_t          bus
);

  device_decode #(.N(N)) u_dec (
    .group_en (group_en),
    .dev_addr (dev_addr),
    .dev_sel  (dev_sel)
  );

  always_comb begin
    bus = '0;
    for (int i = 0; i < N; i++)
      if (dev_sel[i]) begin
        bus.data  = bus.data | dev_data[i];
        bus.ready = bus.ready | dev_ready[i];
      end
  end

  assign dev_reset = reset_pulse ? dev_sel : '0;

endmodule
