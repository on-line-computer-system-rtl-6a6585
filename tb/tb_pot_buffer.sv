// tb_pot_buffer: POT loads, direct and converted, and manual set/reset
// with computer loads blocked.
module tb_pot_buffer;
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
  logic rst_n, manual_mode, pot_wr, convert;
  word_t cpu_data, bcd_in, mset, mrst, q, model;

  pot_buffer dut (.clk, .rst_n, .manual_mode, .pot_wr, .cpu_data, .convert, .bcd_in,
    .manual_set(mset), .manual_reset(mrst), .q);

  initial begin
    rst_n = 0; manual_mode = 0; pot_wr = 0; convert = 0;
    cpu_data = '0; bcd_in = '0; mset = '0; mrst = '0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    check(q == '0, "reset");
    model = '0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      manual_mode = i >= 60;
      pot_wr = $urandom % 2 == 0; convert = $urandom % 2 == 0;
      cpu_data = word_t'($urandom); bcd_in = word_t'($urandom);
      mset = word_t'($urandom) & word_t'($urandom); mrst = word_t'($urandom) & word_t'($urandom);
      if (manual_mode) model = (model | mset) & ~mrst;
      else if (pot_wr) model = convert ? bcd_in : cpu_data;
      @(posedge clk); #1;
      check(q == model, "buffer contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
