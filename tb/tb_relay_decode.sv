// tb_relay_decode: the relay selection is latched on an EOM load to its
// division and held while later EOMs go to other divisions.
module tb_relay_decode;
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
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst_n, div_en, eom_load;
  logic [ADDR_W-1:0] addr, held;
  logic [511:0] relay_sel;
  logic sel_valid;

  relay_decode dut (.clk, .rst_n, .div_en, .eom_load, .addr, .relay_sel, .sel_valid);

  initial begin
    rst_n = 0; div_en = 0; eom_load = 0; addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(relay_sel == '0 && !sel_valid, "nothing after reset");
    held = '0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      addr = 9'($urandom); div_en = ($urandom % 3) == 0; eom_load = ($urandom % 2) == 0;
      if (div_en && eom_load) held = addr;
      @(posedge clk); #1;
      div_en = 0; eom_load = 0;
      if (dut.sel_valid) check(relay_sel == (512'(1) << held), "held relay");
    end
    check(sel_valid, "selected at least once");
    check($countones(relay_sel) == 1, "exactly one relay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
