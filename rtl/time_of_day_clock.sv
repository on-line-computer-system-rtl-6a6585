// time_of_day_clock: a time of day clock read by the computer as one word.
//
// The time is kept as six BCD digits, hours:minutes:seconds, in the 24 data
// bits (hours in bits 23:16, seconds in bits 7:0), advanced by a
// once-a-second `tick` and rolling over from 23:59:59 to 00:00:00. The
// operator presets it with `set_en` / `set_time`. The document only names
// the clock; the BCD format, the tick and the preset are this design's
// choices. Timing: the time advances one clock after the tick.
module time_of_day_clock
  import sds_if_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tick,
  input  logic  set_en,
  input  word_t set_time,
  output word_t time_bcd
);

  // Digits, least significant first: s1 s10 m1 m10 h1 h10.
  logic [3:0] d [6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 6; i++) d[i] <= '0;
    end else if (set_en) begin
      for (int i = 0; i < 6; i++) d[i] <= set_time[4*i +: 4];
    end else if (tick) begin
      if (d[0] != 4'd9) d[0] <= d[0] + 1'b1;
      else begin
        d[0] <= '0;
        if (d[1] != 4'd5) d[1] <= d[1] + 1'b1;
        else begin
          d[1] <= '0;
          if (d[2] != 4'd9) d[2] <= d[2] + 1'b1;
          else begin
            d[2] <= '0;
            if (d[3] != 4'd5) d[3] <= d[3] + 1'b1;
            else begin
              d[3] <= '0;
              if (d[5] == 4'd2 && d[4] == 4'd3) begin
                d[4] <= '0;
                d[5] <= '0;
              end else if (d[4] != 4'd9) d[4] <= d[4] + 1'b1;
              else begin
                d[4] <= '0;
                d[5] <= d[5] + 1'b1;
              end
            end
          end
        end
      end
    end
  end

  always_comb
    for (int i = 0; i < 6; i++) time_bcd[4*i +: 4] = d[i];

endmodule
