// tb_priority_interrupt: drives random pulses, push buttons, arming,
// acknowledges and completions, and compares armed/waiting/active and the
// request with a reference model of the priority rules. Also checks that
// a lower level waits while a higher one is in process.
module tb_priority_interrupt;
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
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst_n, arm_we, ack, done, int_req;
  logic [31:0] pulse_in, push_button, arm_mask, armed, waiting, active;
  logic [4:0] int_level;
  logic [31:0] m_armed, m_wait, m_act, m_prev, edges;
  int m_lvl;
  bit  m_req;
  int  nested = 0, lost_disarmed = 0;

  priority_interrupt dut (.clk, .rst_n, .pulse_in, .push_button, .arm_we, .arm_mask,
    .ack, .done, .armed, .waiting, .active, .int_req, .int_level);

  function automatic void model_req();
    m_lvl = -1;
    for (int i = 31; i >= 0; i--) if (m_wait[i]) m_lvl = i;
    m_req = 0;
    if (m_lvl >= 0) begin
      m_req = 1;
      for (int i = 0; i <= m_lvl; i++) if (m_act[i]) m_req = 0;
    end
  endfunction

  initial begin
    rst_n = 0; pulse_in = '0; push_button = '0; arm_we = 0; arm_mask = '0; ack = 0; done = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    m_armed = '0; m_wait = '0; m_act = '0; m_prev = '0;
    // directed: level 9 in process, level 20 waits, level 3 preempts
    @(negedge clk); arm_we = 1; arm_mask = '1; m_armed = '1;
    @(negedge clk); arm_we = 0; pulse_in[9] = 1;
    @(negedge clk); pulse_in[9] = 0; #1;
    check(int_req && int_level == 9, "level 9 requests");
    ack = 1; @(negedge clk); ack = 0;
    push_button[20] = 1; @(negedge clk); push_button[20] = 0; #1;
    check(waiting[20] && !int_req, "level 20 waits behind 9");
    pulse_in[3] = 1; @(negedge clk); pulse_in[3] = 0; #1;
    check(int_req && int_level == 3, "level 3 preempts 9");
    ack = 1; @(negedge clk); ack = 0;
    done = 1; @(negedge clk); done = 0; #1;
    check(active == 32'(1 << 9), "3 done, 9 still active");
    done = 1; @(negedge clk); done = 0; #1;
    check(int_req && int_level == 20, "20 requests after 9 done");
    ack = 1; @(negedge clk); ack = 0;
    done = 1; @(negedge clk); done = 0;
    m_wait = '0; m_act = '0; m_prev = '0;
    // random against the model
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      #1;
      model_req();
      check(int_req == m_req, "request");
      if (m_req) check(int_level == 5'(m_lvl), "level");
      check(armed == m_armed && waiting == m_wait && active == m_act, "state");
      pulse_in = $urandom & $urandom & $urandom; push_button = ($urandom % 8 == 0) ? 32'(1) << ($urandom % 32) : '0;
      arm_we = $urandom % 50 == 0; arm_mask = $urandom | $urandom;
      ack = m_req && ($urandom % 3 == 0);
      done = $urandom % 4 == 0;
      edges = (pulse_in | push_button) & ~m_prev;
      m_prev = pulse_in | push_button;
      if (|(edges & ~m_armed)) lost_disarmed++;
      if (ack) begin m_wait[m_lvl] = 0; if (|m_act) nested++; end
      begin
        int hi = -1;
        for (int i = 31; i >= 0; i--) if (m_act[i]) hi = i;
        if (done && hi >= 0) m_act[hi] = 0;
      end
      if (ack) m_act[m_lvl] = 1;
      m_wait = m_wait | (edges & m_armed);
      if (arm_we) m_armed = arm_mask;
    end
    check(nested > 0, "nesting happened");
    check(lost_disarmed > 0, "disarmed pulses seen");
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
