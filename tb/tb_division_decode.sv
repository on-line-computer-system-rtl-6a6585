// tb_division_decode: every division number selects exactly its block,
// and nothing is selected while the EOM buffer is not valid.
module tb_division_decode;
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
  logic [DIV_W-1:0] division;
  logic valid;
  logic [N_DIV-1:0] div_en;

  division_decode dut (.division, .valid, .div_en);

  initial begin
    for (int d = 0; d < N_DIV; d++) begin
      division = 3'(d); valid = 1; #1;
      check(div_en == N_DIV'(1 << d), "one-hot division");
      valid = 0; #1;
      check(div_en == '0, "invalid selects none");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
