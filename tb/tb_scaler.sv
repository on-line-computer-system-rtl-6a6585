// tb_scaler: counts one pulse per clock while gated (the full counting
// rate), holds while the gate is closed, overflows from all ones to zero
// with a one-clock pulse, and clears on reset.
module tb_scaler;
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
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst_n, pulse_in, gate, reset, overflow, ready;
  word_t count;
  int unsigned model;
  int ovf_seen = 0;

  scaler dut (.clk, .rst_n, .pulse_in, .gate, .reset, .count, .overflow, .ready);

  initial begin
    rst_n = 0; pulse_in = 0; gate = 0; reset = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    model = 0;
    // 100 pulses back to back: one count per clock
    @(negedge clk); gate = 1; pulse_in = 1;
    repeat (100) @(negedge clk);
    pulse_in = 0; #1;
    check(count == 100, "full-rate counting");
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      pulse_in = $urandom % 2 == 0; gate = $urandom % 4 != 0;
      @(posedge clk); #1;
      if (gate && pulse_in) model++;
      check(count == word_t'(model + 100), "count");
      check(ready == !gate, "ready");
    end
    // overflow: preset near the top through counting is slow, so force
    @(negedge clk); reset = 1; @(negedge clk); reset = 0; #1;
    check(count == 0, "reset");
    force dut.count = 24'hFFFFFE;
    @(negedge clk); release dut.count;
    gate = 1; pulse_in = 1;
    for (int i = 0; i < 4; i++) begin
      @(posedge clk); #1;
      if (overflow) begin ovf_seen++; check(count == 0, "wrapped to zero"); end
    end
    check(ovf_seen == 1, "one overflow pulse");
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
