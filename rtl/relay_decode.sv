// relay_decode: the 9-bit decoder in front of a digital voltmeter's relay
// multiplexer. It selects one of up to 2^9 analogue inputs.
//
// The document has the computer pick the DVM input with this decoder and
// then read the DVM through an ordinary group decoder. That second EOM
// replaces the EOM buffer, so this decoder latches its address when an EOM
// load (eom_load, one clock, the clock after the EOM buffer changed)
// finds its division enabled, and keeps the relay closed until the next
// such load. The latch is this design's reading of that two-step use.
// `sel_valid` stays low until the first selection after reset.
module relay_decode
  import sds_if_pkg::*;
#(
  parameter int N = 1 << ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              div_en,
  input  logic              eom_load,
  input  logic [ADDR_W-1:0] addr,
  output logic [N-1:0]      relay_sel,
  output logic              sel_valid
);

  logic [ADDR_W-1:0] addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q    <= '0;
      sel_valid <= 1'b0;
    end else if (div_en && eom_load) begin
      addr_q    <= addr;
      sel_valid <= 1'b1;
    end
  end

  always_comb begin
    relay_sel = '0;
    for (int i = 0; i < N; i++)
      if (sel_valid && addr_q == ADDR_W'(i)) relay_sel[i] = 1'b1;
  end

endmodule
