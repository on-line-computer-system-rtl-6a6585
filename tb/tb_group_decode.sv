// tb_group_decode: all 512 addresses, enabled and disabled; the upper four
// bits pick the group line and the lower five pass on as device address.
module tb_group_decode;
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
  logic enable;
  logic [ADDR_W-1:0] addr;
  logic [N_GROUP-1:0] group_sel;
  logic [DEV_W-1:0] dev_addr;

  group_decode dut (.enable, .addr, .group_sel, .dev_addr);

  initial begin
    for (int a = 0; a < 512; a++) begin
      addr = 9'(a); enable = 1; #1;
      check(group_sel == N_GROUP'(1 << (a / 32)), "group line");
      check(dev_addr == 5'(a % 32), "device lines");
      enable = 0; #1;
      check(group_sel == '0, "disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
