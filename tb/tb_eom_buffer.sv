// tb_eom_buffer: loads the EOM buffer from the computer, checks that
// manual mode blocks computer loads and applies panel set/reset bits
// (reset winning), and checks the valid flag from reset onward.
module tb_eom_buffer;
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
  logic rst_n, manual_mode, eom_strobe;
  eom_word_t eom_in, eom_q;
  logic [EOM_W-1:0] mset, mrst, model;
  logic valid;

  eom_buffer dut (.clk, .rst_n, .manual_mode, .eom_strobe, .eom_in,
                  .manual_set(mset), .manual_reset(mrst), .eom_q, .valid);

  initial begin
    rst_n = 0; manual_mode = 0; eom_strobe = 0; eom_in = '0; mset = '0; mrst = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(!valid && eom_q == '0, "reset state");
    model = '0;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      eom_in = eom_word_t'($urandom);
      eom_strobe = ($urandom % 2) == 0;
      if (eom_strobe) model = eom_in;
      @(posedge clk); #1;
      eom_strobe = 0;
      check(eom_q == model, "computer load");
    end
    check(valid, "valid after load");
    // manual mode: computer ignored, bits set/cleared
    manual_mode = 1;
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      eom_strobe = 1; eom_in = eom_word_t'($urandom);
      mset = EOM_W'($urandom); mrst = EOM_W'($urandom);
      model = (model | mset) & ~mrst;
      @(posedge clk); #1;
      check(eom_q == model, "manual set/reset");
    end
    @(negedge clk); eom_strobe = 0; mset = '0; mrst = '0; manual_mode = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
