// tb_interval_timer: loads intervals and feeds irregular clock-in pulses;
// the completion pulse must come exactly after the loaded number of
// rising edges, once. Also loading zero and reloading while running.
module tb_interval_timer;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst_n, load, clock_in, running, completion;
  word_t interval, remaining;
  int edges, pulses;

  interval_timer dut (.clk, .rst_n, .load, .interval, .clock_in, .remaining, .running, .completion);

  task automatic run(int n, int expect_pulse_at);
    @(negedge clk); load = 1; interval = word_t'(n);
    @(negedge clk); load = 0;
    edges = 0; pulses = 0;
    for (int t = 0; t < 4 * (n + 5); t++) begin
      @(negedge clk);
      if (clock_in == 0 && $urandom % 2 == 0) begin clock_in = 1; edges++; end
      else clock_in = 0;
      @(posedge clk); #1;
      if (completion) begin
        pulses++;
        check(edges == expect_pulse_at, "completion after N edges");
      end
    end
    check(pulses == (expect_pulse_at > 0 ? 1 : 0), "one completion pulse");
    check(!running, "stopped");
  endtask

  initial begin
    rst_n = 0; load = 0; interval = '0; clock_in = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    run(1, 1);
    run(7, 7);
    run(50, 50);
    run(0, 0);
    // reload while running restarts the count
    @(negedge clk); load = 1; interval = 24'd10;
    @(negedge clk); load = 0;
    repeat (3) begin @(negedge clk); clock_in = 1; @(negedge clk); clock_in = 0; end
    check(remaining == 24'd7 && running, "counting down");
    run(4, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
