// tb_device_decode: a 20-device decoder; each address selects only its
// device, addresses 20..31 and a low group line select none.
module tb_device_decode;
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
  localparam int N = 20;
  logic group_en;
  logic [DEV_W-1:0] dev_addr;
  logic [N-1:0] dev_sel;

  device_decode #(.N(N)) dut (.group_en, .dev_addr, .dev_sel);

  initial begin
    for (int a = 0; a < 32; a++) begin
      dev_addr = 5'(a); group_en = 1; #1;
      check(dev_sel == (a < N ? N'(1) << a : '0), "device select");
      group_en = 0; #1;
      check(dev_sel == '0, "group low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
