// tb_time_of_day_clock: preset, seconds/minutes/hours carries, and the
// rollover from 23:59:59 to 00:00:00, against a seconds-of-day model.
module tb_time_of_day_clock;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst_n, tick, set_en;
  word_t set_time, time_bcd;
  int unsigned sec;

  time_of_day_clock dut (.clk, .rst_n, .tick, .set_en, .set_time, .time_bcd);

  function automatic word_t hms(int unsigned s);
    int unsigned h = s / 3600, m = (s / 60) % 60, x = s % 60;
    return {4'(h / 10), 4'(h % 10), 4'(m / 10), 4'(m % 10), 4'(x / 10), 4'(x % 10)};
  endfunction

  initial begin
    rst_n = 0; tick = 0; set_en = 0; set_time = '0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    check(time_bcd == '0, "reset to midnight");
    for (int start = 0; start < 3; start++) begin
      sec = (start == 0) ? 86400 - 1000 : (start == 1) ? 9 * 3600 + 59 * 60 + 30 : 12345;
      @(negedge clk); set_en = 1; set_time = hms(sec);
      @(negedge clk); set_en = 0; #1;
      check(time_bcd == hms(sec), "preset");
      for (int t = 0; t < 4000; t++) begin
        @(negedge clk); tick = $urandom % 2 == 0;
        if (tick) sec = (sec + 1) % 86400;
        @(posedge clk); #1;
        check(time_bcd == hms(sec), "time");
      end
      tick = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
