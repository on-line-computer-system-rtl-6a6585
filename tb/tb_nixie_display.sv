// tb_nixie_display: loads random words and checks the held value and the
// one-of-ten cathode lines of each tube, blank for codes above 9.
module tb_nixie_display;
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
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst_n, load;
  word_t data, shown, model;
  logic [9:0] cathode [BCD_DIGITS];

  nixie_display dut (.clk, .rst_n, .load, .data, .shown, .cathode);

  initial begin
    rst_n = 0; load = 0; data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    model = '0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      load = $urandom % 2 == 0; data = word_t'($urandom);
      if (load) model = data;
      @(posedge clk); #1;
      check(shown == model, "held value");
      for (int t = 0; t < BCD_DIGITS; t++)
        check(cathode[t] == (model[4*t +: 4] <= 9 ? 10'(1) << model[4*t +: 4] : 10'(0)), "cathodes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
