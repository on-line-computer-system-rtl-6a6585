// tb_op_code_decode: all eight op codes, with and without a valid EOM
// buffer, against the expected transfer modes.
module tb_op_code_decode;
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
  logic [OP_W-1:0] op;
  logic valid;
  xfer_mode_t mode;

  op_code_decode dut (.op, .valid, .mode);

  initial begin
    for (int v = 0; v < 2; v++)
      for (int c = 0; c < 8; c++) begin
        op = 3'(c); valid = v[0]; #1;
        if (!valid) check(mode == '0, "invalid gives nothing");
        else begin
          check(mode.convert     == (c < 4 && c[0]), "convert");
          check(mode.reset_after == (c < 4 && c[1]), "reset");
          check(mode.ready_test  == (c == 4), "ready test");
          check(mode.spare       == (c > 4 ? 3'(1 << (c - 5)) : 3'b0), "spare");
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
