// tb_flag_register: flags set by their inputs stay set until reset; reset
// wins; any_set follows the contents.
module tb_flag_register;
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
  logic rst_n, reset, any_set;
  word_t set, q, model;

  flag_register dut (.clk, .rst_n, .set, .reset, .q, .any_set);

  initial begin
    rst_n = 0; set = '0; reset = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    model = '0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      set = ($urandom % 3 == 0) ? word_t'(1) << ($urandom % 24) : '0;
      reset = $urandom % 20 == 0;
      model = reset ? '0 : model | set;
      @(posedge clk); #1;
      check(q == model, "flags");
      check(any_set == (model != 0), "any_set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
