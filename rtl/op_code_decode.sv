// op_code_decode: the SYSTEM OP CODE decoder, three EOM bits that give the
// kind of input/output transfer.
//
// The document lists the choices (conversion or not, reset of the device
// after the transfer or not, and special tests such as the ready test) but
// not their codes. This design uses: op[2] = 0 for a data transfer, with
// op[0] asking for BCD<->binary conversion and op[1] for a reset of the
// device after its data is taken; op[2] = 1 for a special test with no data
// transfer, op[1:0] = 0 being the ready test and codes 1..3 three spare test
// lines brought out for other equipment. Purely combinational.
module op_code_decode
  import sds_if_pkg::*;
(
  input  logic [OP_W-1:0] op,
  input  logic            valid,
  output xfer_mode_t      mode
);

  always_comb begin
    mode = '0;
    if (valid) begin
      if (!op[2]) begin
        mode.convert     = op[0];
        mode.reset_after = op[1];
      end else begin
        unique case (op[1:0])
          2'd0: mode.ready_test = 1'b1;
          2'd1: mode.spare[0]   = 1'b1;
          2'd2: mode.spare[1]   = 1'b1;
          2'd3: mode.spare[2]   = 1'b1;
        endcase
      end
    end
  end

endmodule
