// tb_patch_panel: a scrambled plugging with two sources on one level and
// one source unplugged; every source alone, then random combinations.
module tb_patch_panel;
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
  function automatic logic [31:0][4:0] scramble();
    for (int i = 0; i < 32; i++) scramble[i] = 5'((i * 7 + 3) % 32);
    scramble[5] = scramble[6];
  endfunction
  localparam logic [31:0][4:0] MAP = scramble();
  localparam logic [31:0] PLUGGED = ~32'(1 << 11);
  logic [31:0] src, lvl, expect_lvl;

  patch_panel #(.SRC_LEVEL(MAP), .SRC_PLUGGED(PLUGGED)) dut (.src_pulse(src), .level_pulse(lvl));

  initial begin
    for (int t = 0; t < 232; t++) begin
      src = (t < 32) ? 32'(1) << t : $urandom;
      expect_lvl = '0;
      for (int i = 0; i < 32; i++)
        if (src[i] && i != 11) expect_lvl[(i == 5 ? (6 * 7 + 3) % 32 : (i * 7 + 3) % 32)] = 1;
      #1;
      check(lvl == expect_lvl, "patched levels");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
