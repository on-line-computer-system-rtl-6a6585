// tb_transfer_control: checks the one-clock spacing of the EOM load, PIN
// capture or ready sample, device reset after PIN, and output strobe after
// POT, for each transfer mode and in manual mode.
module tb_transfer_control;
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
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst_n, manual_mode, eom_strobe, pin_rd, pot_wr;
  xfer_mode_t mode;
  logic eom_load, pin_capture, ready_sample, dev_reset, out_strobe;

  transfer_control dut (.clk, .rst_n, .manual_mode, .eom_strobe, .pin_rd, .pot_wr,
    .mode, .eom_load, .pin_capture, .ready_sample, .dev_reset, .out_strobe);

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1;
    @(negedge clk); s = 0;
  endtask

  initial begin
    rst_n = 0; manual_mode = 0; eom_strobe = 0; pin_rd = 0; pot_wr = 0; mode = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      for (int man = 0; man < 2; man++) begin
        @(negedge clk);
        manual_mode = man[0];
        mode = '0;
        mode.convert = m[0];
        mode.reset_after = m[1];
        if (m == 3) begin mode.reset_after = 0; mode.ready_test = 1; end
        // EOM: nothing in the strobe clock, the capture or sample in the next
        eom_strobe = 1; #1;
        check(!eom_load && !pin_capture && !ready_sample, "no capture in EOM clock");
        @(negedge clk); eom_strobe = 0; #1;
        check(eom_load == !man[0], "eom_load one clock later");
        check(pin_capture == (!man[0] && m != 3), "pin capture");
        check(ready_sample == (!man[0] && m == 3), "ready sample");
        @(negedge clk); #1;
        check(!eom_load && !pin_capture && !ready_sample, "single clock");
        // PIN: reset one clock after, if asked for
        pin_rd = 1; #1;
        check(!dev_reset, "no reset during PIN");
        @(negedge clk); pin_rd = 0; #1;
        check(dev_reset == (!man[0] && m == 2), "reset after PIN");
        @(negedge clk); #1;
        check(!dev_reset, "reset is one clock");
        // POT: strobe one clock after
        pot_wr = 1; #1;
        check(!out_strobe, "no strobe during POT");
        @(negedge clk); pot_wr = 0; #1;
        check(out_strobe == !man[0], "strobe after POT");
        @(negedge clk); #1;
        check(!out_strobe, "strobe is one clock");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
