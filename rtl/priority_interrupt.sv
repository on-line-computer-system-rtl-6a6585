// priority_interrupt: the 32 levels of priority interrupt as the interface
// presents them, with the ARMED and WAITING status that the panel shows.
//
// Each level is energized by a pulse from a device (through the patch
// panel) or by the operator's push button; a rising edge of either counts.
// A level that is armed (ready to accept pulses) and receives a pulse
// becomes waiting; a level that is not armed ignores it. Level 0 has the
// highest priority. `int_req` is raised while some waiting level is of
// higher priority than every level in process, and `int_level` names the
// highest such level. The computer's acknowledge (`ack`) moves that level
// from waiting to in process (`active`); `done` ends the highest-priority
// level in process, after which a lower waiting level can be taken. The
// computer arms and disarms levels by writing a mask (`arm_we`). The
// document gives the 32 levels, the pulse and push-button sources and the
// armed/waiting indicators; the numbering, edge detection, arming by mask
// and the ack/done handshake are this design's choices.
// Timing: a pulse edge shows as waiting one clock after the edge is seen
// (edges are detected against the previous clock's inputs).
module priority_interrupt
  import sds_if_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_LEVEL-1:0] pulse_in,
  input  logic [N_LEVEL-1:0] push_button,
  input  logic               arm_we,
  input  logic [N_LEVEL-1:0] arm_mask,
  input  logic               ack,
  input  logic               done,
  output logic [N_LEVEL-1:0] armed,
  output logic [N_LEVEL-1:0] waiting,
  output logic [N_LEVEL-1:0] active,
  output logic               int_req,
  output logic [4:0]         int_level
);

  logic [N_LEVEL-1:0] src_q, edge_in, take, finish;
  logic               found;

  assign edge_in = (pulse_in | push_button) & ~src_q;

  // Highest waiting level, and whether it outranks every active level.
  always_comb begin
    found     = 1'b0;
    int_level = '0;
    int_req   = 1'b0;
    for (int i = N_LEVEL - 1; i >= 0; i--)
      if (waiting[i]) begin
        found     = 1'b1;
        int_level = 5'(i);
      end
    if (found) begin
      int_req = 1'b1;
      for (int i = 0; i < N_LEVEL; i++)
        if (active[i] && i <= int'(int_level)) int_req = 1'b0;
    end
  end

  // Level taken on acknowledge, and highest active level ended on done.
  always_comb begin
    take   = '0;
    finish = '0;
    if (ack && int_req) take[int_level] = 1'b1;
    if (done)
      for (int i = N_LEVEL - 1; i >= 0; i--)
        if (active[i]) finish = N_LEVEL'(1) << i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_q   <= '0;
      armed   <= '0;
      waiting <= '0;
      active  <= '0;
    end else begin
      src_q   <= pulse_in | push_button;
      if (arm_we) armed <= arm_mask;
      waiting <= (waiting & ~take) | (edge_in & armed);
      active  <= (active & ~finish) | take;
    end
  end

  a_ack_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
    ack |-> int_req)
    else $error("priority_interrupt: acknowledge without a request");

endmodule
