// transfer_control: sequences one input or output transfer around the
// computer's EOM, PIN and POT instructions.
//
// Input (EOM A, then PIN B): the EOM strobe loads the EOM buffer; on the
// next clock the decoders have settled, and `eom_load` pulses. With a data
// transfer mode the same clock raises `pin_capture`, which loads the PIN
// BUFFER from the bus; with the ready-test mode it raises `ready_sample`
// instead, which loads the READY FF from the selected device's DEVICE
// READY line. A later PIN instruction (`pin_rd`) reads the buffer; if the
// mode asks for a reset, `dev_reset` pulses on the clock after the read, so
// the device is reset only after its data has been transferred.
// Output (EOM A, then POT B): the POT strobe loads the POT BUFFER, and
// `out_strobe` pulses on the next clock to load the selected output device.
// Nothing is captured or strobed in manual mode, where the operator owns
// the buffers. The order of operations follows the document; the one-clock
// spacing is this design's choice. Assertions check that the computer
// never issues two of the instructions in the same clock.
module transfer_control
  import sds_if_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       manual_mode,
  input  logic       eom_strobe,
  input  logic       pin_rd,
  input  logic       pot_wr,
  input  xfer_mode_t mode,
  output logic       eom_load,
  output logic       pin_capture,
  output logic       ready_sample,
  output logic       dev_reset,
  output logic       out_strobe
);

  logic is_transfer;
  assign is_transfer = !mode.ready_test && !(|mode.spare);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eom_load   <= 1'b0;
      dev_reset  <= 1'b0;
      out_strobe <= 1'b0;
    end else begin
      eom_load   <= eom_strobe && !manual_mode;
      dev_reset  <= pin_rd && !manual_mode && mode.reset_after;
      out_strobe <= pot_wr && !manual_mode;
    end
  end

  assign pin_capture  = eom_load && is_transfer;
  assign ready_sample = eom_load && mode.ready_test;

  a_one_instruction: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({eom_strobe, pin_rd, pot_wr}))
    else $error("transfer_control: EOM, PIN and POT in the same clock");

endmodule
