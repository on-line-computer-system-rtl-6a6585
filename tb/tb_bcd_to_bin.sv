// tb_bcd_to_bin: random six-digit decimal numbers and the extremes,
// converted and compared with the number itself; bad digits flagged.
module tb_bcd_to_bin;
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
  word_t bcd, bin;
  logic bad_digit;
  int unsigned n;

  bcd_to_bin dut (.bcd, .bin, .bad_digit);

  function automatic word_t to_bcd(int unsigned v);
    word_t r = '0;
    for (int d = 0; d < 6; d++) begin r[4*d +: 4] = 4'(v % 10); v /= 10; end
    return r;
  endfunction

  initial begin
    for (int i = 0; i < 300; i++) begin
      n = (i == 0) ? 0 : (i == 1) ? 999999 : $urandom % 1000000;
      bcd = to_bcd(n); #1;
      check(bin == word_t'(n), "conversion");
      check(!bad_digit, "digits valid");
    end
    bcd = 24'h00_00A0; #1;
    check(bad_digit, "digit 10 flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
