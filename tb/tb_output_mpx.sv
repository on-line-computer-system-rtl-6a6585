// tb_output_mpx: a 16-device output multiplexer; the strobe reaches only
// the selected device, and only while its group line is raised.
module tb_output_mpx;
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
  localparam int N = 16;
  logic group_en, strobe;
  logic [DEV_W-1:0] dev_addr;
  logic [N-1:0] dev_sel, dev_load;

  output_mpx #(.N(N)) dut (.group_en, .dev_addr, .strobe, .dev_sel, .dev_load);

  initial begin
    for (int t = 0; t < 200; t++) begin
      dev_addr = 5'($urandom); group_en = $urandom % 4 != 0; strobe = $urandom % 2 == 0;
      #1;
      if (group_en && dev_addr < N)
        check(dev_load == (strobe ? N'(1) << dev_addr : '0), "load to selected");
      else
        check(dev_load == '0, "no load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
