// patch_panel: the interrupt patch panel, which lets any device's
// interrupt pulse be plugged into any of the 32 priority levels.
//
// Up to 32 sources; source i drives level SRC_LEVEL[i] if bit i of
// SRC_PLUGGED is set. Several sources may share a level (their pulses are
// ORed). The plugging is fixed by parameters, as a patch panel is fixed by
// its cords; the default plugs source i into level i. Combinational.
module patch_panel
  import sds_if_pkg::*;
#(
  parameter logic [31:0][4:0] SRC_LEVEL   = identity_map(),
  parameter logic [31:0]      SRC_PLUGGED = '1
) (
  input  logic [31:0]        src_pulse,
  output logic [N_LEVEL-1:0] level_pulse
);

  function automatic logic [31:0][4:0] identity_map();
    for (int i = 0; i < 32; i++) identity_map[i] = 5'(i);
  endfunction

  always_comb begin
    level_pulse = '0;
    for (int i = 0; i < 32; i++)
      if (SRC_PLUGGED[i] && src_pulse[i]) level_pulse[SRC_LEVEL[i]] = 1'b1;
  end

endmodule
