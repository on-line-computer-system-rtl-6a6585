// tb_ready_ff: sampling the ready line, clearing, and sample winning over
// clear.
module tb_ready_ff;
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
  logic rst_n, sample, clear, device_ready, ready_q, model;

  ready_ff dut (.clk, .rst_n, .sample, .clear, .device_ready, .ready_q);

  initial begin
    rst_n = 0; sample = 0; clear = 0; device_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    check(!ready_q, "reset");
    model = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      sample = $urandom % 3 == 0; clear = $urandom % 3 == 0; device_ready = $urandom % 2 == 0;
      if (sample) model = device_ready; else if (clear) model = 0;
      @(posedge clk); #1;
      check(ready_q == model, "ready ff");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
