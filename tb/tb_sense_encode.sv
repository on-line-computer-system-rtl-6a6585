// tb_sense_encode: every sense line selected with random line states.
module tb_sense_encode;
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
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [31:0] lines;
  logic [4:0] sel;
  logic sense;

  sense_encode dut (.lines, .sel, .sense);

  initial begin
    for (int t = 0; t < 320; t++) begin
      lines = $urandom; sel = 5'(t); #1;
      check(sense == lines[t % 32], "selected line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
