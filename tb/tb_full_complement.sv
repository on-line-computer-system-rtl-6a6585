// tb_full_complement: the full device complement of the three
// spectrometers, at the interface's default sizes, driven as a computer
// program would: every device of every input group is read through EOM +
// PIN and compared with what the device holds; each of the 4 voltmeters is
// read with each of its 512 relays closed in turn (relay decoder first,
// then the voltmeter through its group); every output device (magnet
// supply, 3 interval timers, 12 nixie displays) is written through POT;
// every channel of the 128-channel and of the 4096-channel analyzer
// memories receives events and is read back. Each read also checks that
// the word is available two clocks after the EOM strobe.
module tb_full_complement;
  import sds_if_pkg::*;

  int checks = 0, failures = 0;
  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N_DCB = 11, N_PHA = 8, N_SCALER = 20, N_FLAG_BANKS = 2, N_THUMB = 10;
  localparam int N_SHAFT = 12, N_DVM = 4, N_TIMER = 3, N_NIXIE = 12;

  logic rst_n;
  logic eom_strobe, pin_rd, pot_wr, sks_sense, int_arm_we, int_ack, int_done, int_req;
  eom_word_t eom_addr, eom_ind;
  word_t pin_data, pot_data, pin_ind, pot_ind;
  logic [4:0] sks_sel, int_level;
  logic [31:0] int_arm_mask, int_push_button, int_armed, int_waiting, int_active;
  logic manual_mode;
  logic [14:0] eom_manual_set, eom_manual_reset;
  word_t pin_manual_set, pin_manual_reset, pot_manual_set, pot_manual_reset;
  logic [2:0] special_test;
  word_t dcb_hit [N_DCB];
  logic dcb_master_gate, dcb_panel_reset;
  logic [6:0] pha_code [N_PHA];
  logic [N_PHA-1:0] pha_ready;
  logic pha_event, pha_clear, pha_busy;
  logic [6:0] pha_rd_addr;
  word_t pha_rd_data;
  logic [5:0] pha2d_x, pha2d_y;
  logic pha2d_event, pha2d_clear, pha2d_busy;
  logic [11:0] pha2d_rd_addr;
  word_t pha2d_rd_data;
  logic [N_SCALER-1:0] scaler_pulse;
  logic scaler_gate, scaler_panel_reset;
  word_t flag_set [N_FLAG_BANKS];
  logic flag_panel_reset;
  word_t status_switches;
  word_t thumbwheel [N_THUMB];
  word_t shaft_encoder [N_SHAFT];
  logic tod_tick, tod_set_en;
  word_t tod_set_time;
  word_t dvm_reading [N_DVM];
  logic [N_DVM-1:0] dvm_eoc;
  logic [511:0] relay_sel [N_DVM];
  word_t magnet_setpoint;
  logic magnet_load;
  logic [N_TIMER-1:0] timer_clock_in, timer_completion;
  word_t nixie_value [N_NIXIE];
  logic [9:0] nixie_cathode [N_NIXIE][BCD_DIGITS];
  logic [4:0] ext_int_pulse;
  logic [28:0] sense_ext;
  logic [7:5] spare_div_en;
  logic [15:8] exp_group_sel;
  logic [8:0] exp_addr;
  logic exp_dev_reset, exp_out_strobe;
  in_bus_t exp_bus;

  spectrometer_interface dut (.*);

  // Voltmeter model: the reading is a function of the closed relay.
  always_comb
    for (int v = 0; v < N_DVM; v++) begin
      dvm_reading[v] = word_t'(32'h0F0000 * v);
      for (int r = 0; r < 512; r++)
        if (relay_sel[v][r]) dvm_reading[v] = word_t'(32'h0F0000 * v + r * 3 + 1);
    end

  function automatic eom_word_t ea(int op, int div, int grp, int dev);
    return eom_word_t'({3'(op), 3'(div), 4'(grp), 5'(dev)});
  endfunction

  // EOM then PIN as early as the interface allows: the word must be in
  // the PIN buffer two clocks after the EOM strobe.
  task automatic read_dev(int grp, int dev, word_t expect_word, string what);
    @(negedge clk); eom_addr = ea(0, 0, grp, dev); eom_strobe = 1;
    @(negedge clk); eom_strobe = 0;
    @(negedge clk); pin_rd = 1; #1;
    check(pin_data == expect_word, what);
    @(negedge clk); pin_rd = 0;
  endtask

  task automatic eom_only(eom_word_t a);
    @(negedge clk); eom_addr = a; eom_strobe = 1;
    @(negedge clk); eom_strobe = 0;
    @(negedge clk);
  endtask

  task automatic pot(word_t d);
    @(negedge clk); pot_data = d; pot_wr = 1;
    @(negedge clk); pot_wr = 0;
    @(negedge clk);
  endtask

  int n_dev_read = 0, n_relay = 0;

  initial begin
    rst_n = 0;
    eom_strobe = 0; pin_rd = 0; pot_wr = 0; eom_addr = '0; pot_data = '0; sks_sel = '0;
    int_arm_we = 0; int_arm_mask = '0; int_ack = 0; int_done = 0; int_push_button = '0;
    manual_mode = 0; eom_manual_set = '0; eom_manual_reset = '0;
    pin_manual_set = '0; pin_manual_reset = '0; pot_manual_set = '0; pot_manual_reset = '0;
    foreach (dcb_hit[i]) dcb_hit[i] = '0;
    dcb_master_gate = 0; dcb_panel_reset = 0;
    foreach (pha_code[i]) pha_code[i] = 7'(i * 17 + 2);
    pha_ready = '1; pha_event = 0; pha_clear = 0; pha_rd_addr = '0;
    pha2d_x = '0; pha2d_y = '0; pha2d_event = 0; pha2d_clear = 0; pha2d_rd_addr = '0;
    scaler_pulse = '0; scaler_gate = 0; scaler_panel_reset = 0;
    foreach (flag_set[i]) flag_set[i] = '0;
    flag_panel_reset = 0;
    status_switches = 24'h123456;
    foreach (thumbwheel[i]) thumbwheel[i] = word_t'(32'h900000 + i);
    foreach (shaft_encoder[i]) shaft_encoder[i] = word_t'(32'h7000 + 33 * i);
    tod_tick = 0; tod_set_en = 0; tod_set_time = '0;
    dvm_eoc = '1; timer_clock_in = '0; ext_int_pulse = '0; sense_ext = '0;
    exp_bus = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Load every DCB channel and every scaler, set every flag.
    @(negedge clk); dcb_master_gate = 1;
    foreach (dcb_hit[i]) dcb_hit[i] = word_t'($urandom);
    @(negedge clk); dcb_master_gate = 0;
    scaler_gate = 1;
    for (int t = 0; t < 3 * N_SCALER; t++) begin
      @(negedge clk);
      for (int i = 0; i < N_SCALER; i++) scaler_pulse[i] = (t < 3 * i + 2);
    end
    @(negedge clk); scaler_pulse = '0; scaler_gate = 0;
    flag_set[0] = 24'hFFFFFF; flag_set[1] = 24'h0F0F0F;
    @(negedge clk); flag_set[0] = '0; flag_set[1] = '0;
    tod_set_en = 1; tod_set_time = 24'h120000;
    @(negedge clk); tod_set_en = 0;

    // Every input device.
    for (int i = 0; i < N_DCB; i++) begin read_dev(0, i, dut.dcb_q[i], "DCB"); n_dev_read++; end
    for (int i = 0; i < N_PHA; i++) begin read_dev(1, i, word_t'(pha_code[i]), "PHA"); n_dev_read++; end
    for (int i = 0; i < N_SCALER; i++) begin read_dev(2, i, word_t'(3 * i + 2), "scaler"); n_dev_read++; end
    read_dev(3, 0, 24'hFFFFFF, "flags 1-24"); read_dev(3, 1, 24'h0F0F0F, "flags 25-48");
    read_dev(3, 2, 24'h123456, "status switches"); n_dev_read += 3;
    for (int i = 0; i < N_THUMB; i++) begin read_dev(3, 3 + i, thumbwheel[i], "thumbwheel"); n_dev_read++; end
    for (int i = 0; i < N_SHAFT; i++) begin read_dev(4, i, shaft_encoder[i], "shaft encoder"); n_dev_read++; end
    read_dev(6, 0, 24'h120000, "time of day"); n_dev_read++;

    // Every relay of every voltmeter.
    for (int v = 0; v < N_DVM; v++)
      for (int r = 0; r < 512; r++) begin
        eom_only(ea(0, v + 1, r / 32, r % 32));
        check(relay_sel[v] == (512'(1) << r), "relay closed");
        read_dev(7, v, word_t'(32'h0F0000 * v + r * 3 + 1), "DVM reading");
        n_relay++;
      end

    // Every output device.
    eom_only(ea(0, 0, 5, 0)); pot(24'h00ABCD);
    check(magnet_setpoint == 24'h00ABCD, "magnet");
    for (int i = 0; i < N_TIMER; i++) begin
      eom_only(ea(0, 0, 5, 1 + i)); pot(word_t'(i + 2));
      check(dut.g_timer[0].running || i != 0, "timer running");
    end
    for (int i = 0; i < N_NIXIE; i++) begin
      eom_only(ea(1, 0, 5, 1 + N_TIMER + i)); pot(word_t'(111 * i + 5));
    end
    for (int i = 0; i < N_NIXIE; i++) begin
      word_t e;
      int unsigned x;
      e = '0;
      x = 111 * i + 5;
      for (int d = 0; d < 6; d++) begin e[4*d +: 4] = 4'(x % 10); x /= 10; end
      check(nixie_value[i] == e, "nixie");
    end

    // Both analyzer memories: every channel.
    @(negedge clk); pha_clear = 1; pha2d_clear = 1;
    @(negedge clk); pha_clear = 0; pha2d_clear = 0;
    while (pha_busy || pha2d_busy) @(negedge clk);
    for (int c = 0; c < 4096; c++) begin
      @(negedge clk);
      {pha2d_y, pha2d_x} = 12'(c); pha2d_event = 1;
      pha_code[0] = 7'(c % 128); pha_event = 1;
      @(negedge clk); pha2d_event = 0; pha_event = 0;
      @(negedge clk);
    end
    @(negedge clk); @(negedge clk);
    for (int c = 0; c < 4096; c++) begin
      pha2d_rd_addr = 12'(c); @(negedge clk);
      check(pha2d_rd_data == 24'd1, "2-D analyzer channel");
    end
    for (int c = 0; c < 128; c++) begin
      pha_rd_addr = 7'(c); @(negedge clk);
      check(pha_rd_data == 24'd32, "analyzer channel");
    end

    check(n_dev_read == N_DCB + N_PHA + N_SCALER + 3 + N_THUMB + N_SHAFT + 1, "all input devices read");
    check(n_relay == N_DVM * 512, "all relays used");
    $display("devices read %0d, relay readings %0d", n_dev_read, n_relay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
