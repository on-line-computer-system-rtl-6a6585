// tb_pin_buffer: captures from the bus, the direct and converted paths to
// the computer, and manual set/reset with captures blocked.
module tb_pin_buffer;
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
  logic rst_n, manual_mode, capture, convert;
  word_t bus_data, mset, mrst, bin_in, q, cpu_data, model;

  pin_buffer dut (.clk, .rst_n, .manual_mode, .capture, .bus_data,
    .manual_set(mset), .manual_reset(mrst), .convert, .bin_in, .q, .cpu_data);

  initial begin
    rst_n = 0; manual_mode = 0; capture = 0; convert = 0;
    bus_data = '0; mset = '0; mrst = '0; bin_in = '0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    check(q == '0, "reset");
    model = '0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      manual_mode = i >= 50;
      capture = $urandom % 2 == 0; bus_data = word_t'($urandom);
      mset = word_t'($urandom) & word_t'($urandom); mrst = word_t'($urandom) & word_t'($urandom);
      if (manual_mode) model = (model | mset) & ~mrst;
      else if (capture) model = bus_data;
      @(posedge clk); #1;
      check(q == model, "buffer contents");
      bin_in = word_t'($urandom); convert = $urandom % 2 == 0; #1;
      check(cpu_data == (convert ? bin_in : model), "computer path");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
