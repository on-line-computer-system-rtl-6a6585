// tb_dcb_buffer: hits are latched only while the master gate is open,
// held after it closes, cleared by reset; ready follows the gate.
module tb_dcb_buffer;
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
  logic rst_n, master_gate, reset, ready;
  word_t hit, q, model;

  dcb_buffer dut (.clk, .rst_n, .hit, .master_gate, .reset, .q, .ready);

  initial begin
    rst_n = 0; hit = '0; master_gate = 0; reset = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    model = '0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      hit = word_t'($urandom) & word_t'($urandom) & word_t'($urandom);
      if (i % 40 == 0) master_gate = !master_gate;
      reset = $urandom % 25 == 0;
      if (reset) model = '0; else if (master_gate) model |= hit;
      #1;
      check(ready == !master_gate, "ready");
      @(posedge clk); #1;
      check(q == model, "latched hits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
