// spectrometer_interface: the interface between a 24-bit SDS 9300 computer
// and the equipment of the spectrometer facility, with the digital parts of
// the devices it reads and drives.
//
// The computer selects a device with an EOM instruction, whose 15-bit
// address lands in the EOM BUFFER: 3 bits give the transfer mode, 3 bits
// choose one of 8 sub-decoders (division 0 is the standard group decoder,
// divisions 1..4 the relay decoders of the four digital voltmeters,
// divisions 5..7 are brought out), and 9 bits are the address. The group
// decoder raises one of 16 group lines; each local multiplexer has its
// own device decoder for the 5 device lines and, when its group is
// raised, drives the selected device onto the common 24-line input bus.
// The PIN BUFFER captures the bus one clock after the EOM and the computer
// reads it with PIN, directly or through the BCD-to-binary converter; a
// reset mode then resets the device. On output, POT loads the POT BUFFER,
// directly or through the binary-to-BCD converter, and one clock later the
// output multiplexer loads the selected output device. A ready-test EOM
// samples the device's READY line into the READY FF, read on sense line 0.
// Device pulses reach the 32 priority interrupt levels through a patch
// panel; push buttons energize levels by hand.
//
// Group map (the group numbers G1..G7 follow the figure's line drivers; the
// use of G8 for the voltmeters is this design's choice):
//   G1 (group 0)  DCB buffers, 24 channels each       devices 0..N_DCB-1
//   G2 (group 1)  pulse height analyzer ADC words     devices 0..N_PHA-1
//   G3 (group 2)  scalers                             devices 0..N_SCALER-1
//   G4 (group 3)  flag banks, status switches, thumbwheels, in that order
//   G5 (group 4)  shaft encoders
//   G6 (group 5)  output: magnet supply 0, interval timers, nixie displays
//   G7 (group 6)  time of day clock, device 0
//   G8 (group 7)  digital voltmeter readings
//   groups 8..15  brought out for expansion
// Interrupt sources on the patch panel, in order: voltmeter end of
// conversion, scaler overflows, interval timer completions, then external
// pulses. Sense lines: 0 READY FF, 1 bad BCD digit in the PIN buffer,
// 2 binary-to-BCD overflow on the last converted POT, 3..31 external.
//
// Device counts default to the document's: 264 DCB channels (11 units),
// 8 analyzers of 128 channels, one 4096-channel two-dimensional analyzer,
// 20 scalers, 48 flags, 10 thumbwheel switches, 12 shaft encoders, 4
// voltmeters, 12 nixie displays. The figure shows three interval timers.
// Analogue and mechanical parts (ADCs, voltmeters, relays, switches,
// encoders, the magnet supply) are outside: their digital words are ports.
module spectrometer_interface
  import sds_if_pkg::*;
#(
  parameter int N_DCB         = 11,
  parameter int N_PHA         = 8,
  parameter int PHA_CHANNELS  = 128,
  parameter int PHA2D_AXIS_W  = 6,     // 64 x 64 = 4096 channels
  parameter int N_SCALER      = 20,
  parameter int N_FLAG_BANKS  = 2,
  parameter int N_THUMB       = 10,
  parameter int N_SHAFT       = 12,
  parameter int N_DVM         = 4,
  parameter int N_RELAY       = 512,
  parameter int N_TIMER       = 3,
  parameter int N_NIXIE       = 12,
  localparam int PHA_CH_W     = $clog2(PHA_CHANNELS),
  localparam int PHA2D_CH_W   = 2 * PHA2D_AXIS_W,
  localparam int N_G4         = N_FLAG_BANKS + 1 + N_THUMB,
  localparam int N_OUT        = 1 + N_TIMER + N_NIXIE,
  localparam int N_EXT_INT    = N_LEVEL - N_DVM - N_SCALER - N_TIMER
) (
  input  logic clk,
  input  logic rst_n,

  // Computer side
  input  logic              eom_strobe,
  input  eom_word_t         eom_addr,
  input  logic              pin_rd,
  output word_t             pin_data,
  input  logic              pot_wr,
  input  word_t             pot_data,
  input  logic [4:0]        sks_sel,
  output logic              sks_sense,
  input  logic              int_arm_we,
  input  logic [N_LEVEL-1:0] int_arm_mask,
  input  logic              int_ack,
  input  logic              int_done,
  output logic              int_req,
  output logic [4:0]        int_level,

  // Control panel
  input  logic              manual_mode,
  input  logic [EOM_W-1:0]  eom_manual_set,
  input  logic [EOM_W-1:0]  eom_manual_reset,
  input  word_t             pin_manual_set,
  input  word_t             pin_manual_reset,
  input  word_t             pot_manual_set,
  input  word_t             pot_manual_reset,
  input  logic [N_LEVEL-1:0] int_push_button,
  output eom_word_t         eom_ind,
  output word_t             pin_ind,
  output word_t             pot_ind,
  output logic [N_LEVEL-1:0] int_armed,
  output logic [N_LEVEL-1:0] int_waiting,
  output logic [N_LEVEL-1:0] int_active,
  output logic [2:0]        special_test,

  // Input devices
  input  word_t             dcb_hit [N_DCB],
  input  logic              dcb_master_gate,
  input  logic              dcb_panel_reset,
  input  logic [PHA_CH_W-1:0] pha_code [N_PHA],
  input  logic [N_PHA-1:0]  pha_ready,
  input  logic              pha_event,
  input  logic              pha_clear,
  output logic              pha_busy,
  input  logic [PHA_CH_W-1:0] pha_rd_addr,
  output word_t             pha_rd_data,
  input  logic [PHA2D_AXIS_W-1:0] pha2d_x,
  input  logic [PHA2D_AXIS_W-1:0] pha2d_y,
  input  logic              pha2d_event,
  input  logic              pha2d_clear,
  output logic              pha2d_busy,
  input  logic [PHA2D_CH_W-1:0] pha2d_rd_addr,
  output word_t             pha2d_rd_data,
  input  logic [N_SCALER-1:0] scaler_pulse,
  input  logic              scaler_gate,
  input  logic              scaler_panel_reset,
  input  word_t             flag_set [N_FLAG_BANKS],
  input  logic              flag_panel_reset,
  input  word_t             status_switches,
  input  word_t             thumbwheel [N_THUMB],
  input  word_t             shaft_encoder [N_SHAFT],
  input  logic              tod_tick,
  input  logic              tod_set_en,
  input  word_t             tod_set_time,
  input  word_t             dvm_reading [N_DVM],
  input  logic [N_DVM-1:0]  dvm_eoc,
  output logic [N_RELAY-1:0] relay_sel [N_DVM],

  // Output devices
  output word_t             magnet_setpoint,
  output logic              magnet_load,
  input  logic [N_TIMER-1:0] timer_clock_in,
  output logic [N_TIMER-1:0] timer_completion,
  output word_t             nixie_value [N_NIXIE],
  output logic [9:0]        nixie_cathode [N_NIXIE][BCD_DIGITS],

  // Interrupt pulses from other equipment, and spare sense lines
  input  logic [N_EXT_INT-1:0] ext_int_pulse,
  input  logic [N_SENSE-4:0]   sense_ext,

  // Expansion: unused divisions and groups, shared lines, extra bus input
  output logic [N_DIV-1:N_DVM+1] spare_div_en,
  output logic [N_GROUP-1:8]     exp_group_sel,
  output logic [ADDR_W-1:0]      exp_addr,
  output logic                   exp_dev_reset,
  output logic                   exp_out_strobe,
  input  in_bus_t                exp_bus
);

  // ------------------------------------------------------------------
  // Decoding logic
  // ------------------------------------------------------------------
  eom_word_t          eom_q;
  logic               eom_valid;
  xfer_mode_t         mode;
  logic [N_DIV-1:0]   div_en;
  logic [N_GROUP-1:0] group_sel;
  logic [DEV_W-1:0]   dev_addr;
  logic eom_load, pin_capture, ready_sample, dev_reset, out_strobe;

  eom_buffer u_eom (
    .clk, .rst_n, .manual_mode, .eom_strobe,
    .eom_in       (eom_addr),
    .manual_set   (eom_manual_set),
    .manual_reset (eom_manual_reset),
    .eom_q        (eom_q),
    .valid        (eom_valid)
  );

  op_code_decode u_op (.op(eom_q.op), .valid(eom_valid), .mode(mode));

  division_decode u_div (.division(eom_q.division), .valid(eom_valid), .div_en(div_en));

  group_decode u_grp (
    .enable    (div_en[0]),
    .addr      (eom_q.addr),
    .group_sel (group_sel),
    .dev_addr  (dev_addr)
  );

  transfer_control u_ctl (
    .clk, .rst_n, .manual_mode, .eom_strobe, .pin_rd, .pot_wr,
    .mode, .eom_load, .pin_capture, .ready_sample, .dev_reset, .out_strobe
  );

  for (genvar v = 0; v < N_DVM; v++) begin : g_relay
    logic unused_valid;
    relay_decode #(.N(N_RELAY)) u_relay (
      .clk, .rst_n,
      .div_en    (div_en[v+1]),
      .eom_load  (eom_load),
      .addr      (eom_q.addr),
      .relay_sel (relay_sel[v]),
      .sel_valid (unused_valid)
    );
  end

  assign spare_div_en   = div_en[N_DIV-1:N_DVM+1];
  assign exp_group_sel  = group_sel[N_GROUP-1:8];
  assign exp_addr       = eom_q.addr;
  assign exp_dev_reset  = dev_reset;
  assign exp_out_strobe = out_strobe;
  assign special_test   = mode.spare;
  assign eom_ind        = eom_q;

  // ------------------------------------------------------------------
  // Input devices and their multiplexers
  // ------------------------------------------------------------------
  in_bus_t bus_g1, bus_g2, bus_g3, bus_g4, bus_g5, bus_g7, bus_g8, bus;

  // G1: DCB buffers
  word_t              dcb_q [N_DCB];
  logic [N_DCB-1:0]   dcb_ready, dcb_sel, dcb_reset;
  for (genvar i = 0; i < N_DCB; i++) begin : g_dcb
    dcb_buffer u_dcb (
      .clk, .rst_n,
      .hit         (dcb_hit[i]),
      .master_gate (dcb_master_gate),
      .reset       (dcb_panel_reset | dcb_reset[i]),
      .q           (dcb_q[i]),
      .ready       (dcb_ready[i])
    );
  end
  input_mpx #(.N(N_DCB)) u_mpx_g1 (
    .group_en (group_sel[0]), .dev_addr, .dev_data(dcb_q), .dev_ready(dcb_ready),
    .reset_pulse(dev_reset), .dev_sel(dcb_sel), .dev_reset(dcb_reset), .bus(bus_g1)
  );

  // G2: pulse height analyzer words; analyzer 0 also fills its core memory
  word_t              pha_word [N_PHA];
  logic [N_PHA-1:0]   pha_sel, pha_reset;
  for (genvar i = 0; i < N_PHA; i++) begin : g_pha
    assign pha_word[i] = WORD_W'(pha_code[i]);
  end
  input_mpx #(.N(N_PHA)) u_mpx_g2 (
    .group_en (group_sel[1]), .dev_addr, .dev_data(pha_word), .dev_ready(pha_ready),
    .reset_pulse(dev_reset), .dev_sel(pha_sel), .dev_reset(pha_reset), .bus(bus_g2)
  );

  pha_memory #(.CHANNELS(PHA_CHANNELS), .COUNT_W(WORD_W)) u_pha_core (
    .clk, .rst_n,
    .clear       (pha_clear),
    .event_valid (pha_event),
    .event_ch    (pha_code[0]),
    .busy        (pha_busy),
    .rd_addr     (pha_rd_addr),
    .rd_data     (pha_rd_data)
  );

  pha_memory #(.CHANNELS(1 << PHA2D_CH_W), .COUNT_W(WORD_W)) u_pha_2d (
    .clk, .rst_n,
    .clear       (pha2d_clear),
    .event_valid (pha2d_event),
    .event_ch    ({pha2d_y, pha2d_x}),
    .busy        (pha2d_busy),
    .rd_addr     (pha2d_rd_addr),
    .rd_data     (pha2d_rd_data)
  );

  // G3: scalers
  word_t               scaler_count [N_SCALER];
  logic [N_SCALER-1:0] scaler_ready, scaler_ovf, scaler_sel, scaler_reset;
  for (genvar i = 0; i < N_SCALER; i++) begin : g_scaler
    scaler u_scaler (
      .clk, .rst_n,
      .pulse_in (scaler_pulse[i]),
      .gate     (scaler_gate),
      .reset    (scaler_panel_reset | scaler_reset[i]),
      .count    (scaler_count[i]),
      .overflow (scaler_ovf[i]),
      .ready    (scaler_ready[i])
    );
  end
  input_mpx #(.N(N_SCALER)) u_mpx_g3 (
    .group_en (group_sel[2]), .dev_addr, .dev_data(scaler_count), .dev_ready(scaler_ready),
    .reset_pulse(dev_reset), .dev_sel(scaler_sel), .dev_reset(scaler_reset), .bus(bus_g3)
  );

  // G4: flag banks, manual status switches, thumbwheel switches
  word_t           g4_data [N_G4];
  logic [N_G4-1:0] g4_ready, g4_sel, g4_reset;
  for (genvar i = 0; i < N_FLAG_BANKS; i++) begin : g_flag
    flag_register u_flag (
      .clk, .rst_n,
      .set     (flag_set[i]),
      .reset   (flag_panel_reset | g4_reset[i]),
      .q       (g4_data[i]),
      .any_set (g4_ready[i])
    );
  end
  assign g4_data[N_FLAG_BANKS]  = status_switches;
  assign g4_ready[N_FLAG_BANKS] = 1'b1;
  for (genvar i = 0; i < N_THUMB; i++) begin : g_thumb
    assign g4_data[N_FLAG_BANKS+1+i]  = thumbwheel[i];
    assign g4_ready[N_FLAG_BANKS+1+i] = 1'b1;
  end
  input_mpx #(.N(N_G4)) u_mpx_g4 (
    .group_en (group_sel[3]), .dev_addr, .dev_data(g4_data), .dev_ready(g4_ready),
    .reset_pulse(dev_reset), .dev_sel(g4_sel), .dev_reset(g4_reset), .bus(bus_g4)
  );

  // G5: shaft encoders
  logic [N_SHAFT-1:0] shaft_sel, shaft_reset;
  input_mpx #(.N(N_SHAFT)) u_mpx_g5 (
    .group_en (group_sel[4]), .dev_addr, .dev_data(shaft_encoder), .dev_ready('1),
    .reset_pulse(dev_reset), .dev_sel(shaft_sel), .dev_reset(shaft_reset), .bus(bus_g5)
  );

  // G7: time of day clock
  word_t tod_word [1];
  logic [0:0] tod_sel, tod_reset;
  time_of_day_clock u_tod (
    .clk, .rst_n, .tick(tod_tick), .set_en(tod_set_en), .set_time(tod_set_time),
    .time_bcd(tod_word[0])
  );
  input_mpx #(.N(1)) u_mpx_g7 (
    .group_en (group_sel[6]), .dev_addr, .dev_data(tod_word), .dev_ready(1'b1),
    .reset_pulse(dev_reset), .dev_sel(tod_sel), .dev_reset(tod_reset), .bus(bus_g7)
  );

  // G8: digital voltmeter readings
  logic [N_DVM-1:0] dvm_sel, dvm_reset;
  input_mpx #(.N(N_DVM)) u_mpx_g8 (
    .group_en (group_sel[7]), .dev_addr, .dev_data(dvm_reading), .dev_ready(dvm_eoc),
    .reset_pulse(dev_reset), .dev_sel(dvm_sel), .dev_reset(dvm_reset), .bus(bus_g8)
  );

  // Common bus: the line drivers of the groups not selected drive nothing.
  assign bus = bus_g1 | bus_g2 | bus_g3 | bus_g4 | bus_g5 | bus_g7 | bus_g8 | exp_bus;

  // ------------------------------------------------------------------
  // PIN side
  // ------------------------------------------------------------------
  word_t pin_bin;
  logic  pin_bad_digit, ready_q;

  pin_buffer u_pin (
    .clk, .rst_n, .manual_mode,
    .capture      (pin_capture),
    .bus_data     (bus.data),
    .manual_set   (pin_manual_set),
    .manual_reset (pin_manual_reset),
    .convert      (mode.convert),
    .bin_in       (pin_bin),
    .q            (pin_ind),
    .cpu_data     (pin_data)
  );

  bcd_to_bin u_bcd2bin (.bcd(pin_ind), .bin(pin_bin), .bad_digit(pin_bad_digit));

  ready_ff u_ready (
    .clk, .rst_n,
    .sample       (ready_sample),
    .clear        (pin_capture),
    .device_ready (bus.ready),
    .ready_q      (ready_q)
  );

  // ------------------------------------------------------------------
  // POT side and output devices
  // ------------------------------------------------------------------
  word_t pot_bcd;
  logic  pot_overflow, pot_conv_error;

  bin_to_bcd u_bin2bcd (.bin(pot_data), .bcd(pot_bcd), .overflow(pot_overflow));

  pot_buffer u_pot (
    .clk, .rst_n, .manual_mode, .pot_wr,
    .cpu_data     (pot_data),
    .convert      (mode.convert),
    .bcd_in       (pot_bcd),
    .manual_set   (pot_manual_set),
    .manual_reset (pot_manual_reset),
    .q            (pot_ind)
  );

  // Remembers whether the last converted POT word did not fit in six digits.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      pot_conv_error <= 1'b0;
    else if (pot_wr && !manual_mode) pot_conv_error <= mode.convert && pot_overflow;
  end

  logic [N_OUT-1:0] out_sel, out_load;
  output_mpx #(.N(N_OUT)) u_mpx_g6 (
    .group_en (group_sel[5]), .dev_addr, .strobe(out_strobe),
    .dev_sel  (out_sel), .dev_load(out_load)
  );

  // The magnet supply takes the POT word as its setting when loaded.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           magnet_setpoint <= '0;
    else if (out_load[0]) magnet_setpoint <= pot_ind;
  end
  assign magnet_load = out_load[0];

  for (genvar i = 0; i < N_TIMER; i++) begin : g_timer
    word_t remaining;
    logic  running;
    interval_timer u_timer (
      .clk, .rst_n,
      .load       (out_load[1+i]),
      .interval   (pot_ind),
      .clock_in   (timer_clock_in[i]),
      .remaining  (remaining),
      .running    (running),
      .completion (timer_completion[i])
    );
  end

  for (genvar i = 0; i < N_NIXIE; i++) begin : g_nixie
    nixie_display u_nixie (
      .clk, .rst_n,
      .load    (out_load[1+N_TIMER+i]),
      .data    (pot_ind),
      .shown   (nixie_value[i]),
      .cathode (nixie_cathode[i])
    );
  end

  // ------------------------------------------------------------------
  // Interrupts and sense lines
  // ------------------------------------------------------------------
  logic [N_LEVEL-1:0] level_pulse;

  patch_panel u_patch (
    .src_pulse   ({ext_int_pulse, timer_completion, scaler_ovf, dvm_eoc}),
    .level_pulse (level_pulse)
  );

  priority_interrupt u_int (
    .clk, .rst_n,
    .pulse_in    (level_pulse),
    .push_button (int_push_button),
    .arm_we      (int_arm_we),
    .arm_mask    (int_arm_mask),
    .ack         (int_ack),
    .done        (int_done),
    .armed       (int_armed),
    .waiting     (int_waiting),
    .active      (int_active),
    .int_req     (int_req),
    .int_level   (int_level)
  );

  sense_encode u_sense (
    .lines ({sense_ext, pot_conv_error, pin_bad_digit, ready_q}),
    .sel   (sks_sel),
    .sense (sks_sense)
  );

endmodule
