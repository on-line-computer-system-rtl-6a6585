// eom_buffer: the 15 EOM BUFFER flip-flops of the decoding logic.
//
// An EOM instruction (eom_strobe, one clock) loads the 15-bit address word
// from the computer. In manual mode the computer load is ignored and an
// operator sets or clears single bits from the control panel instead
// (manual_set / manual_reset, one bit per flip-flop; reset wins when both
// are raised). The register contents are also the panel indicators.
// `valid` says that the buffer holds a selection: it is cleared by reset
// and set by the first load or manual change, so that nothing is selected
// after power-up. The 15 flip-flops, the EOM load and the manual set/reset
// come from the document; the `valid` flag and the reset-wins rule are
// this design's choice. Timing: the new contents appear one clock after
// the strobe.
module eom_buffer
  import sds_if_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             manual_mode,
  input  logic             eom_strobe,
  input  eom_word_t        eom_in,
  input  logic [EOM_W-1:0] manual_set,
  input  logic [EOM_W-1:0] manual_reset,
  output eom_word_t        eom_q,
  output logic             valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eom_q <= '0;
      valid <= 1'b0;
    end else if (manual_mode) begin
      if (|(manual_set | manual_reset)) begin
        eom_q <= (eom_q | manual_set) & ~manual_reset;
        valid <= 1'b1;
      end
    end else if (eom_strobe) begin
      eom_q <= eom_in;
      valid <= 1'b1;
    end
  end

endmodule
