// tb_spectrometer_interface: end-to-end test of the whole interface at its
// default sizes, with the testbench playing the computer (EOM, PIN, POT,
// skip-on-sense, interrupt acknowledge) and the equipment.
//
// It reads a device of every input group through EOM + PIN, reads a BCD
// thumbwheel through the converter, resets a scaler after its readout,
// runs ready tests that pass and fail, selects a voltmeter relay through a
// relay decoder and then reads the voltmeter through its group, writes the
// magnet supply, a nixie display (converted) and an interval timer whose
// completion raises an interrupt, checks the conversion overflow sense
// line, takes interrupts from a voltmeter, a scaler overflow and a push
// button including a nested one, fills and reads both analyzer memories,
// uses manual mode on the panel, and reads the expansion bus. Each of these
// mechanisms is counted; one that never happened is a failure.
module tb_spectrometer_interface;
  import sds_if_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge clk);
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

  // Mechanism counters
  int n_read [8];
  int n_convert_in = 0, n_reset_after = 0, n_ready_pass = 0, n_ready_fail = 0;
  int n_relay = 0, n_magnet = 0, n_nixie = 0, n_timer = 0, n_overflow_sense = 0;
  int n_int_dvm = 0, n_int_scaler = 0, n_int_button = 0, n_int_nested = 0;
  int n_pha = 0, n_pha2d = 0, n_manual = 0, n_expansion = 0, n_special = 0;

  // ---------------- computer instructions ----------------
  function automatic eom_word_t ea(int op, int div, int grp, int dev);
    return eom_word_t'({3'(op), 3'(div), 4'(grp), 5'(dev)});
  endfunction

  task automatic eom(eom_word_t a);
    @(negedge clk); eom_addr = a; eom_strobe = 1;
    @(negedge clk); eom_strobe = 0;
    @(negedge clk);  // capture clock
  endtask

  task automatic pin(output word_t d);
    @(negedge clk); pin_rd = 1; #1; d = pin_data;
    @(negedge clk); pin_rd = 0;
  endtask

  task automatic pot(word_t d);
    @(negedge clk); pot_data = d; pot_wr = 1;
    @(negedge clk); pot_wr = 0;
    @(negedge clk);  // output strobe clock
  endtask

  task automatic sks(int line, output logic s);
    @(negedge clk); sks_sel = 5'(line); #1; s = sks_sense;
  endtask

  task automatic read_dev(int grp, int dev, word_t expect_word, string what, int op = 0);
    word_t d;
    eom(ea(op, 0, grp, dev));
    pin(d);
    check(d == expect_word, what);
    if (d == expect_word) n_read[grp]++;
  endtask

  // Take one interrupt: expect a level, acknowledge it.
  task automatic take_int(int lvl, string what);
    @(negedge clk); #1;
    check(int_req && int_level == 5'(lvl), what);
    int_ack = int_req; @(negedge clk); int_ack = 0;
  endtask

  task automatic end_int();
    @(negedge clk); int_done = 1; @(negedge clk); int_done = 0;
  endtask

  function automatic word_t to_bcd(int unsigned v);
    word_t r = '0;
    for (int d = 0; d < 6; d++) begin r[4*d +: 4] = 4'(v % 10); v /= 10; end
    return r;
  endfunction

  int unsigned hist [128];
  int unsigned hist2d [4096];
  word_t d;
  logic s;

  initial begin
    rst_n = 0;
    eom_strobe = 0; pin_rd = 0; pot_wr = 0; eom_addr = '0; pot_data = '0; sks_sel = '0;
    int_arm_we = 0; int_arm_mask = '0; int_ack = 0; int_done = 0; int_push_button = '0;
    manual_mode = 0; eom_manual_set = '0; eom_manual_reset = '0;
    pin_manual_set = '0; pin_manual_reset = '0; pot_manual_set = '0; pot_manual_reset = '0;
    foreach (dcb_hit[i]) dcb_hit[i] = '0;
    dcb_master_gate = 0; dcb_panel_reset = 0;
    foreach (pha_code[i]) pha_code[i] = 7'(i * 13 + 5);
    pha_ready = 8'b1010_1010; pha_event = 0; pha_clear = 0; pha_rd_addr = '0;
    pha2d_x = '0; pha2d_y = '0; pha2d_event = 0; pha2d_clear = 0; pha2d_rd_addr = '0;
    scaler_pulse = '0; scaler_gate = 0; scaler_panel_reset = 0;
    foreach (flag_set[i]) flag_set[i] = '0;
    flag_panel_reset = 0;
    status_switches = 24'hA5C3E1;
    foreach (thumbwheel[i]) thumbwheel[i] = to_bcd(100000 * (i % 10) + 4321 + i);
    foreach (shaft_encoder[i]) shaft_encoder[i] = word_t'(32'h1000 * i + 7);
    tod_tick = 0; tod_set_en = 0; tod_set_time = '0;
    foreach (dvm_reading[i]) dvm_reading[i] = word_t'(32'h50000 + i);
    dvm_eoc = '0; timer_clock_in = '0; ext_int_pulse = '0; sense_ext = '0;
    exp_bus = '0;
    foreach (n_read[i]) n_read[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Arm every level.
    @(negedge clk); int_arm_we = 1; int_arm_mask = '1;
    @(negedge clk); int_arm_we = 0;

    // ---- G1: DCB buffers latch hits during the master gate ----
    @(negedge clk); dcb_master_gate = 1;
    for (int i = 0; i < N_DCB; i++) dcb_hit[i] = word_t'(32'h111111 * (i + 1));
    @(negedge clk); foreach (dcb_hit[i]) dcb_hit[i] = '0; dcb_master_gate = 0;
    for (int i = 0; i < N_DCB; i++)
      read_dev(0, i, word_t'(32'h111111 * (i + 1)), "DCB word");
    // ready test on a DCB (gate closed: ready) passes
    eom(ea(4, 0, 0, 3)); sks(0, s);
    check(s, "DCB ready test passes"); if (s) n_ready_pass++;

    // ---- G2: analyzer words, ready test that fails (analyzer 0 not ready)
    for (int i = 0; i < N_PHA; i++) read_dev(1, i, word_t'(pha_code[i]), "PHA word");
    eom(ea(4, 0, 1, 0)); sks(0, s);
    check(!s, "PHA 0 ready test fails"); if (!s) n_ready_fail++;
    eom(ea(4, 0, 1, 1)); sks(0, s);
    check(s, "PHA 1 ready test passes"); if (s) n_ready_pass++;

    // ---- G3: scalers; read with reset-after clears the scaler ----
    @(negedge clk); scaler_gate = 1;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      for (int i = 0; i < N_SCALER; i++) scaler_pulse[i] = (t < 2 * i + 1);
    end
    scaler_pulse = '0; @(negedge clk); scaler_gate = 0;
    for (int i = 0; i < N_SCALER; i++)
      read_dev(2, i, word_t'(2 * i + 1), "scaler count", (i == 7) ? 2 : 0);
    read_dev(2, 7, '0, "scaler 7 reset after its read");
    read_dev(2, 8, word_t'(17), "scaler 8 not reset");
    if (dut.g_scaler[7].u_scaler.count == 0) n_reset_after++;

    // ---- G4: flags, status switches, thumbwheels (direct and converted)
    @(negedge clk); flag_set[0] = 24'h000801; flag_set[1] = 24'h400000;
    @(negedge clk); flag_set[0] = '0; flag_set[1] = '0;
    read_dev(3, 0, 24'h000801, "flag bank 0");
    read_dev(3, 1, 24'h400000, "flag bank 1");
    read_dev(3, 2, 24'hA5C3E1, "status switches");
    for (int i = 0; i < N_THUMB; i++) begin
      read_dev(3, 3 + i, thumbwheel[i], "thumbwheel direct");
      eom(ea(1, 0, 3, 3 + i)); pin(d);
      check(d == word_t'(100000 * (i % 10) + 4321 + i), "thumbwheel through BCD-to-binary");
      if (d == word_t'(100000 * (i % 10) + 4321 + i)) n_convert_in++;
    end

    // ---- G5: shaft encoders ----
    for (int i = 0; i < N_SHAFT; i++) read_dev(4, i, shaft_encoder[i], "shaft encoder");

    // ---- G7: time of day ----
    @(negedge clk); tod_set_en = 1; tod_set_time = 24'h235958;
    @(negedge clk); tod_set_en = 0; tod_tick = 1;
    @(negedge clk); @(negedge clk); tod_tick = 0;
    read_dev(6, 0, 24'h000000, "time of day rolled over");

    // ---- DVM: relay select on division 2 (DVM 1), then read via G8 ----
    eom(ea(0, 2, 5, 10));  // relay 5*32+10 = 170
    check(relay_sel[1] == (512'(1) << 170), "relay 170 of DVM 1 closed");
    read_dev(7, 1, word_t'(32'h50001), "DVM 1 reading");
    check(relay_sel[1] == (512'(1) << 170), "relay still closed after the read");
    check(relay_sel[0] == '0 && relay_sel[2] == '0, "other DVM relays open");
    if (relay_sel[1][170]) n_relay++;

    // ---- Interrupts: DVM end of conversion (source 1 -> level 1) ----
    @(negedge clk); dvm_eoc[1] = 1;
    @(negedge clk); dvm_eoc[1] = 0;
    take_int(1, "DVM interrupt on level 1");
    // while level 1 is in process, a push button on level 30 waits
    @(negedge clk); int_push_button[30] = 1; @(negedge clk); int_push_button[30] = 0; #1;
    check(int_waiting[30] && !int_req, "button level waits");
    // a scaler overflow (scaler 0 is source 4 -> level 4) is below level 1: waits too
    force dut.g_scaler[0].u_scaler.count = 24'hFFFFFF;
    @(negedge clk); release dut.g_scaler[0].u_scaler.count;
    scaler_gate = 1; scaler_pulse[0] = 1;
    @(negedge clk); scaler_pulse[0] = 0; scaler_gate = 0;
    @(negedge clk); @(negedge clk); #1;
    check(int_waiting[4], "scaler overflow waits");
    // level 0 (DVM 0) preempts level 1: nested
    @(negedge clk); dvm_eoc[0] = 1; @(negedge clk); dvm_eoc[0] = 0;
    take_int(0, "DVM 0 preempts"); n_int_nested++;
    end_int();
    end_int();  // level 1 done
    n_int_dvm++;
    take_int(4, "scaler overflow interrupt"); n_int_scaler++;
    end_int();
    take_int(30, "push button interrupt"); n_int_button++;
    end_int();
    @(negedge clk); #1; check(!int_req && int_active == '0, "all interrupts served");

    // ---- Output: magnet supply (G6 device 0), direct ----
    eom(ea(0, 0, 5, 0)); pot(24'h3A5F11);
    check(magnet_setpoint == 24'h3A5F11, "magnet setpoint"); if (magnet_setpoint == 24'h3A5F11) n_magnet++;
    // nixie 4 (device 1+3+4 = 8) through binary-to-BCD
    eom(ea(1, 0, 5, 8)); pot(24'(654321));
    check(nixie_value[4] == 24'h654321, "nixie shows decimal digits");
    check(nixie_cathode[4][0] == 10'(1 << 1) && nixie_cathode[4][5] == 10'(1 << 6), "nixie cathodes");
    if (nixie_value[4] == 24'h654321) n_nixie++;
    sks(2, s); check(!s, "no conversion overflow");
    eom(ea(1, 0, 5, 9)); pot(24'd1234567);
    sks(2, s); check(s, "conversion overflow sensed"); if (s) n_overflow_sense++;
    check(nixie_value[5] == 24'h234567, "overflowed value shows low six digits");
    // interval timer 2 (device 3): 5 clock-in pulses, then interrupt on level 26
    eom(ea(0, 0, 5, 3)); pot(24'd5);
    for (int k = 0; k < 5; k++) begin
      @(negedge clk); timer_clock_in[2] = 1; @(negedge clk); timer_clock_in[2] = 0;
    end
    @(negedge clk);
    take_int(4 + N_SCALER + 2, "timer completion interrupt"); n_timer++;
    end_int();

    // ---- Analyzer memories: clear, events, core readout ----
    @(negedge clk); pha_clear = 1; pha2d_clear = 1;
    @(negedge clk); pha_clear = 0; pha2d_clear = 0;
    while (pha2d_busy || pha_busy) @(negedge clk);
    foreach (hist[i]) hist[i] = 0;
    foreach (hist2d[i]) hist2d[i] = 0;
    for (int e = 0; e < 300; e++) begin
      @(negedge clk);
      pha_code[0] = 7'($urandom % 20); pha_event = 1;
      pha2d_x = 6'($urandom % 8); pha2d_y = 6'($urandom % 8); pha2d_event = 1;
      hist[pha_code[0]]++; hist2d[{pha2d_y, pha2d_x}]++;
      @(negedge clk); pha_event = 0; pha2d_event = 0;
      @(negedge clk); @(negedge clk);
    end
    for (int c = 0; c < 20; c++) begin
      @(negedge clk); pha_rd_addr = 7'(c); @(negedge clk);
      check(pha_rd_data == word_t'(hist[c]), "PHA core channel");
    end
    n_pha++;
    for (int c = 0; c < 8 * 64; c++) begin
      if (c % 64 >= 8) continue;
      @(negedge clk); pha2d_rd_addr = 12'(c); @(negedge clk);
      check(pha2d_rd_data == word_t'(hist2d[c]), "2-D PHA channel");
    end
    n_pha2d++;

    // ---- Manual mode on the panel ----
    @(negedge clk); manual_mode = 1; pin_manual_set = 24'h00F00F; eom_manual_set = 15'h0042;
    @(negedge clk); pin_manual_set = '0; eom_manual_set = '0;
    pin_manual_reset = 24'h00000F; eom_manual_reset = 15'h7FBD;
    @(negedge clk); pin_manual_reset = '0; eom_manual_reset = '0;
    #1;
    check(eom_ind == eom_word_t'(15'h0042), "EOM set by hand");
    check(pin_ind[19:12] == 8'h0F && pin_ind[3:0] == 4'h0, "PIN set by hand");
    // a computer EOM is ignored in manual mode
    eom(ea(0, 0, 4, 1));
    check(eom_ind == eom_word_t'(15'h0042), "computer EOM ignored in manual mode");
    @(negedge clk); manual_mode = 0;
    if (eom_ind == eom_word_t'(15'h0042)) n_manual++;

    // ---- Special test lines and expansion groups ----
    eom(ea(5, 0, 0, 0)); #1;
    check(special_test == 3'b001, "special test line 1"); if (special_test == 3'b001) n_special++;
    @(negedge clk); exp_bus.data = 24'hBEEF12; exp_bus.ready = 1;
    eom(ea(0, 0, 9, 3)); #1;
    check(exp_group_sel == 8'b0000_0010 && exp_addr[4:0] == 5'd3, "expansion group 9");
    pin(d); check(d == 24'hBEEF12, "expansion bus read"); if (d == 24'hBEEF12) n_expansion++;
    @(negedge clk); exp_bus = '0;

    // ---- Mechanism report ----
    for (int g = 0; g < 8; g++)
      if (g != 5) check(n_read[g] > 0, $sformatf("read from group %0d", g));
    check(n_convert_in > 0, "BCD-to-binary input");
    check(n_reset_after > 0, "reset after transfer");
    check(n_ready_pass > 0 && n_ready_fail > 0, "ready tests both ways");
    check(n_relay > 0, "relay decoder latch");
    check(n_magnet > 0 && n_nixie > 0 && n_timer > 0, "output devices");
    check(n_overflow_sense > 0, "conversion overflow");
    check(n_int_dvm > 0 && n_int_scaler > 0 && n_int_button > 0 && n_int_nested > 0, "interrupts");
    check(n_pha > 0 && n_pha2d > 0, "analyzer memories");
    check(n_manual > 0 && n_special > 0 && n_expansion > 0, "panel, special, expansion");
    $display("mechanisms: reads G1..G8=%0d %0d %0d %0d %0d - %0d %0d conv_in=%0d reset_after=%0d ready=%0d/%0d relay=%0d",
      n_read[0], n_read[1], n_read[2], n_read[3], n_read[4], n_read[6], n_read[7],
      n_convert_in, n_reset_after, n_ready_pass, n_ready_fail, n_relay);
    $display("mechanisms: magnet=%0d nixie=%0d timer=%0d ovf_sense=%0d int dvm/scaler/button/nested=%0d/%0d/%0d/%0d pha=%0d pha2d=%0d manual=%0d special=%0d expansion=%0d",
      n_magnet, n_nixie, n_timer, n_overflow_sense, n_int_dvm, n_int_scaler, n_int_button,
      n_int_nested, n_pha, n_pha2d, n_manual, n_special, n_expansion);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
