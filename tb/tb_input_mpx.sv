// tb_input_mpx: a 12-device multiplexer. With its group raised, the
// selected device's data and ready line appear on the bus and only it gets
// the reset pulse; with the group low the bus is all zeros.
module tb_input_mpx;
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
  localparam int N = 12;
  logic group_en, reset_pulse;
  logic [DEV_W-1:0] dev_addr;
  word_t dev_data [N];
  logic [N-1:0] dev_ready, dev_sel, dev_reset;
  in_bus_t bus;

  input_mpx #(.N(N)) dut (.group_en, .dev_addr, .dev_data, .dev_ready, .reset_pulse,
                          .dev_sel, .dev_reset, .bus);

  initial begin
    for (int i = 0; i < N; i++) dev_data[i] = word_t'($urandom);
    dev_ready = N'($urandom);
    for (int t = 0; t < 200; t++) begin
      dev_addr = 5'($urandom); group_en = $urandom % 4 != 0; reset_pulse = $urandom % 2 == 0;
      #1;
      if (group_en && dev_addr < N) begin
        check(bus.data == dev_data[dev_addr], "bus data");
        check(bus.ready == dev_ready[dev_addr], "bus ready");
        check(dev_reset == (reset_pulse ? N'(1) << dev_addr : '0), "reset routing");
        check(dev_sel == N'(1) << dev_addr, "select");
      end else begin
        check(bus == '0, "drivers off");
        check(dev_reset == '0, "no reset");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
