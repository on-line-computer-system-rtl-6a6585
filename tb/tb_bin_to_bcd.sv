// tb_bin_to_bcd: random 24-bit values converted to six decimal digits,
// compared digit by digit with integer division; overflow above 999 999.
module tb_bin_to_bcd;
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
  word_t bin, bcd, expect_bcd;
  logic overflow;
  int unsigned v;

  bin_to_bcd dut (.bin, .bcd, .overflow);

  initial begin
    for (int i = 0; i < 400; i++) begin
      case (i)
        0: v = 0;
        1: v = 999999;
        2: v = 1000000;
        3: v = 24'hFFFFFF;
        default: v = (i % 2) ? $urandom % 1000000 : $urandom % (1 << 24);
      endcase
      bin = word_t'(v); #1;
      for (int d = 0; d < 6; d++) expect_bcd[4*d +: 4] = 4'((v / (10 ** d)) % 10);
      check(bcd == expect_bcd, "digits");
      check(overflow == (v > 999999), "overflow");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
