// tb_pha_memory: a 128-channel analyzer memory. Clears it, offers random
// events at random times (some during dead time), checks the three-clock
// dead time, reads every channel back against a reference histogram, and
// checks saturation at the largest count with a 4-bit count width variant.
module tb_pha_memory;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  localparam int CH = 128;
  logic rst_n, clear, event_valid, busy, busy_s, clear_s, ev_s;
  logic [6:0] event_ch, rd_addr, ch_s, rd_s;
  logic [23:0] rd_data;
  logic [3:0]  rd_small;
  int unsigned hist [CH];
  int accepted = 0, dropped = 0;

  pha_memory #(.CHANNELS(CH), .COUNT_W(24)) dut (.clk, .rst_n, .clear, .event_valid,
    .event_ch, .busy, .rd_addr, .rd_data);
  pha_memory #(.CHANNELS(CH), .COUNT_W(4)) dut_small (.clk, .rst_n, .clear(clear_s),
    .event_valid(ev_s), .event_ch(ch_s), .busy(busy_s), .rd_addr(rd_s), .rd_data(rd_small));

  initial begin
    rst_n = 0; clear = 0; event_valid = 0; event_ch = '0; rd_addr = '0;
    clear_s = 0; ev_s = 0; ch_s = '0; rd_s = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); clear = 1; clear_s = 1;
    @(negedge clk); clear = 0; clear_s = 0;
    while (busy) @(negedge clk);
    foreach (hist[i]) hist[i] = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      event_valid = $urandom % 2 == 0;
      event_ch = 7'($urandom % 16 + (($urandom % 4 == 0) ? $urandom % 112 : 0));
      if (event_valid) begin
        if (!busy) begin accepted++; hist[event_ch]++; end
        else dropped++;
      end
      if (event_valid && !busy && accepted % 5 == 0) begin
        @(negedge clk); event_valid = 0; #1;
        check(busy, "busy after accept");
        @(negedge clk); #1;
        check(busy, "busy second clock");
        @(negedge clk); #1;
        check(!busy, "free after three clocks");
      end
    end
    @(negedge clk); event_valid = 0;
    repeat (3) @(negedge clk);
    for (int c = 0; c < CH; c++) begin
      rd_addr = 7'(c);
      @(negedge clk);
      check(rd_data == 24'(hist[c]), "histogram channel");
    end
    check(accepted > 500 && dropped > 0, "events accepted and dropped");
    // saturation: 20 events into one channel of a 4-bit memory
    for (int k = 0; k < 20; k++) begin
      @(negedge clk); ev_s = 1; ch_s = 7'd5;
      @(negedge clk); ev_s = 0;
      repeat (2) @(negedge clk);
    end
    rd_s = 7'd5; @(negedge clk);
    check(rd_small == 4'hF, "count saturates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
